// pipe_div: pipelined unsigned fractional divider, q = num / den.
//
// Produces the quotient as an unsigned fixed-point number with QF
// fractional and QI integer bits (QW = QI + QF bits), truncated, and
// saturated to all ones when it does not fit (this includes den = 0 with
// num > 0; 0/0 gives 0). It is a restoring divider unrolled into one
// register stage per quotient bit: stage k compares the running remainder
// with den << (QW-1-k) and subtracts it when it fits. A side-band tag of
// TW bits travels with each operation so that the caller can keep data
// aligned with the quotient.
//
// Timing: a new operation may enter every cycle (in_valid); its result
// appears with out_valid exactly LAT = QW + 1 cycles later (QW + 1 register
// stages).
//
// The document specifies only a pipelined divider forming the normalised
// correlation; the restoring algorithm, the quotient format and the
// saturation are this design's choices.
module pipe_div #(
  parameter int unsigned NW = 64,   // numerator width
  parameter int unsigned DW = 64,   // denominator width
  parameter int unsigned QF = 16,   // fractional quotient bits
  parameter int unsigned QI = 2,    // integer quotient bits
  parameter int unsigned TW = 1,    // side-band tag width
  localparam int unsigned QW = QI + QF
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  input  logic [TW-1:0] in_tag,
  output logic          out_valid,
  output logic [QW-1:0] q,
  output logic [TW-1:0] out_tag
);
  localparam int unsigned RW = ((NW + QF) > (DW + QW) ? (NW + QF) : (DW + QW)) + 1;

  logic          v   [QW+1];
  logic          sat [QW+1];
  logic          zro [QW+1];   // numerator is zero
  logic [RW-1:0] rem [QW+1];
  logic [DW-1:0] dd  [QW+1];
  logic [QW-1:0] qq  [QW+1];
  logic [TW-1:0] tg  [QW+1];

  // stage 0: scale the numerator and detect overflow
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v[0] <= 1'b0;
    end else begin
      v[0] <= in_valid;
    end
  end
  always_ff @(posedge clk) begin
    rem[0] <= RW'(num) << QF;
    dd[0]  <= den;
    qq[0]  <= '0;
    tg[0]  <= in_tag;
    zro[0] <= (num == '0);
    sat[0] <= (num != '0) && ((RW'(num) << QF) >= (RW'(den) << QW));
  end

  // stages 1..QW: one quotient bit each, most significant first
  for (genvar k = 0; k < int'(QW); k++) begin : g_stage
    localparam int unsigned SH = QW - 1 - k;
    logic [RW-1:0] trial;
    assign trial = RW'(dd[k]) << SH;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v[k+1] <= 1'b0;
      else        v[k+1] <= v[k];
    end
    always_ff @(posedge clk) begin
      dd[k+1]  <= dd[k];
      tg[k+1]  <= tg[k];
      sat[k+1] <= sat[k];
      zro[k+1] <= zro[k];
      if (rem[k] >= trial) begin
        rem[k+1] <= rem[k] - trial;
        qq[k+1]  <= qq[k] | (QW'(1) << SH);
      end else begin
        rem[k+1] <= rem[k];
        qq[k+1]  <= qq[k];
      end
    end
  end

  assign out_valid = v[QW];
  assign q         = sat[QW] ? '1 : (zro[QW] ? '0 : qq[QW]);
  assign out_tag   = tg[QW];
endmodule
