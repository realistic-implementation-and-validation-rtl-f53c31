// align_fifo: latency-compensation delay for the whole-band branch.
//
// The half-band branches see the baseband stream only after the complex
// filtering stage; this FIFO delays the unfiltered stream by the same
// number of samples so that the correlation peaks of all three detection
// branches line up in time. It is a circular buffer of DEPTH complex
// samples: every valid input is written and the sample written DEPTH valid
// inputs earlier is presented, registered, on the output in the same
// cycle's result (out_valid follows in_valid by one clock). Outputs are
// zero until DEPTH samples have been written.
//
// The document only says that the FIFO is sized from the filter latency;
// the circular-buffer implementation and the DEPTH default (the measured
// latency of cplx_halfband_filter in baseband samples) are this design's.
module align_fifo #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_i,
  output logic signed [DW-1:0] out_q
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [2*DW-1:0] mem [DEPTH];
  logic [AW-1:0]   ptr;
  logic [AW:0]     fill;     // saturates at DEPTH

  always_ff @(posedge clk) begin
    if (in_valid) mem[ptr] <= {in_i, in_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
        if (fill != (AW+1)'(DEPTH)) fill <= fill + 1'b1;
        if (fill == (AW+1)'(DEPTH)) {out_i, out_q} <= mem[ptr];
        else                        {out_i, out_q} <= '0;
      end
    end
  end
endmodule
