// corr_metric: normalised CP correlation |dn|^2 / (ds0 * ds1).
//
// The recursive sums from cp_corr are first scaled to 32 bits (the same
// right shift SH for dn and for ds0, ds1, so the ratio is unchanged), then
// two 32-bit multiplier stages form the numerator |dn|^2 = dn_re^2 + dn_im^2
// and the divisor ds0 * ds1, and a pipelined divider forms the metric as an
// unsigned Q2.16 number (1.0 = 65536; ideal CP match without noise gives
// about 1.0, noise and interference pull it down). The scaled dn (for the
// CFO estimate), the top 32 bits of the divisor (for the divisor profile)
// and the delay-memory tap (for data forwarding) ride along with the
// division so that they leave aligned with the metric.
//
// Timing: one sample per cycle; outputs follow the input by LAT = 2 +
// (QI+QF) + 1 = 21 cycles.
//
// The 32-bit multipliers and the pipelined divider follow the block
// diagram of the document; the scaling and the Q2.16 format are this
// design's choices.
module corr_metric #(
  parameter int unsigned DW = 16,
  parameter int unsigned AW = 42,      // width of dn from cp_corr
  parameter int unsigned EW = 41,      // width of ds0/ds1 from cp_corr
  localparam int unsigned QW = 18,     // metric width, Q2.16
  localparam int unsigned SH = (AW > 32) ? AW - 32 : 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [AW-1:0] dn_re,
  input  logic signed [AW-1:0] dn_im,
  input  logic        [EW-1:0] ds0,
  input  logic        [EW-1:0] ds1,
  input  logic signed [DW-1:0] tap_i,
  input  logic signed [DW-1:0] tap_q,
  output logic                 out_valid,
  output logic        [QW-1:0] metric,     // Q2.16
  output logic        [31:0]   divisor,    // ds0*ds1 >> 30 (scaled)
  output logic signed [31:0]   dn_re_s,
  output logic signed [31:0]   dn_im_s,
  output logic signed [DW-1:0] out_tap_i,
  output logic signed [DW-1:0] out_tap_q
);
  // stage A: scale to 32 bits
  logic signed [31:0] a_re, a_im;
  logic        [31:0] a_d0, a_d1;
  logic signed [DW-1:0] a_ti, a_tq;
  logic a_v;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a_v <= 1'b0;
    else        a_v <= in_valid;
  end
  always_ff @(posedge clk) begin
    a_re <= 32'(dn_re >>> SH);
    a_im <= 32'(dn_im >>> SH);
    a_d0 <= 32'(ds0 >> SH);
    a_d1 <= 32'(ds1 >> SH);
    a_ti <= tap_i;
    a_tq <= tap_q;
  end

  // stage B: 32-bit multipliers
  logic [63:0] b_num, b_den;
  logic signed [31:0] b_re, b_im;
  logic signed [DW-1:0] b_ti, b_tq;
  logic b_v;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) b_v <= 1'b0;
    else        b_v <= a_v;
  end
  always_ff @(posedge clk) begin
    logic signed [63:0] sr, si;
    sr = 64'(a_re) * 64'(a_re);
    si = 64'(a_im) * 64'(a_im);
    b_num <= unsigned'(sr) + unsigned'(si);
    b_den <= 64'(a_d0) * 64'(a_d1);
    b_re  <= a_re;
    b_im  <= a_im;
    b_ti  <= a_ti;
    b_tq  <= a_tq;
  end

  // divider with side band
  localparam int unsigned TW = 32 + 32 + 32 + 2*DW;
  logic [TW-1:0] tag_out;
  logic [QW-1:0] q;
  logic [63:0] den_top;
  assign den_top = b_den >> 30;

  pipe_div #(.NW(64), .DW(64), .QF(16), .QI(2), .TW(TW)) u_div (
    .clk(clk), .rst_n(rst_n), .in_valid(b_v), .num(b_num), .den(b_den),
    .in_tag({den_top[31:0], b_re, b_im, b_ti, b_tq}),
    .out_valid(out_valid), .q(q), .out_tag(tag_out)
  );
  assign metric = q;
  assign {divisor, dn_re_s, dn_im_s, out_tap_i, out_tap_q} = tag_out;
endmodule
