// qpsk_mapper: LTE QPSK modulation mapper.
//
// Maps two bits (b0 = bits[1], b1 = bits[0]) onto the point
// ((1-2*b0) + j*(1-2*b1)) / sqrt(2), scaled by AMP: bit value 0 gives +AMP,
// 1 gives -AMP, on each axis. With the default AMP = round(2^15/sqrt(2)/2)
// the points sit at half of full scale. Timing: registered, one cycle.
//
// QPSK is the document's modulation; the bit order and the scale are this
// design's choices (the order is the one of the LTE standard).
module qpsk_mapper #(
  parameter int unsigned DW  = 16,
  parameter int unsigned AMP = 11585
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [1:0]           bits,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_i,
  output logic signed [DW-1:0] out_q
);
  localparam logic signed [DW-1:0] P = DW'(AMP);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_i <= '0;
      out_q <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_i <= bits[1] ? -P : P;
        out_q <= bits[0] ? -P : P;
      end
    end
  end
endmodule
