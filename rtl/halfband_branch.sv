// halfband_branch: interference detection on one 10 MHz half of the band.
//
// A reduced copy of the whole-band chain working on the output of one of
// the complex half-band filters: a CP correlation with a window of 416
// samples (51 fewer than the whole-band one, because the 51-tap filter
// smears the symbol edges), the normalised metric, and its own detection
// state machine. The state machine is started by the central control at
// the first data symbol of each frame, with the frame length the central
// control measured, and it reports whether any data-symbol peak of the
// frame stayed below th_hb. The correlation sums restart with the
// whole-band ones.
//
// Timing: metric lags the input by 24 clk cycles, like the whole-band
// chain, so with the input aligned by the filter, the peaks of the three
// branches coincide.
//
// The window length and the reuse of the whole-band structure follow the
// document. The document also gives each half-band branch its own divisor
// profiling; here the branch relies on the central control's frame timing
// instead, so no divisor profile is kept.
module halfband_branch
  import ifm_pkg::*;
#(
  parameter int unsigned DW      = 16,
  parameter int unsigned N       = N_FFT,
  parameter int unsigned CP      = CP_LEN,
  parameter int unsigned L       = L_HB,
  parameter int unsigned SW      = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  input  logic                 restart,
  input  logic                 start,
  input  logic [SW-1:0]        frame_len,
  input  logic [17:0]          det_level,
  input  logic [17:0]          th_hb,
  output logic                 decision_valid,
  output logic                 interf,
  output logic                 m_valid,
  output logic [17:0]          metric,
  output logic [1:0]           det_state
);
  localparam int unsigned AW = 2*DW + 1 + $clog2(L);
  localparam int unsigned EW = 2*DW + $clog2(L);

  logic                 c_valid;
  logic signed [AW-1:0] dn_re, dn_im;
  logic        [EW-1:0] ds0, ds1;
  logic signed [DW-1:0] tap_i, tap_q;

  cp_corr #(.DW(DW), .N(N), .L(L)) u_corr (
    .clk, .rst_n, .restart, .in_valid, .in_i, .in_q,
    .out_valid(c_valid), .dn_re, .dn_im, .ds0, .ds1, .tap_i, .tap_q
  );

  logic [31:0]          divisor;
  logic signed [31:0]   dn_re_s, dn_im_s;
  logic signed [DW-1:0] mt_i, mt_q;
  corr_metric #(.DW(DW), .AW(AW), .EW(EW)) u_metric (
    .clk, .rst_n, .in_valid(c_valid), .dn_re, .dn_im, .ds0, .ds1, .tap_i, .tap_q,
    .out_valid(m_valid), .metric, .divisor, .dn_re_s, .dn_im_s,
    .out_tap_i(mt_i), .out_tap_q(mt_q)
  );

  logic [SW-1:0] np, nv;
  band_detect #(.QW(18), .SYM_LEN(N + CP), .SW(SW)) u_det (
    .clk, .rst_n, .in_valid(m_valid), .metric, .level(det_level), .threshold(th_hb),
    .start, .frame_len, .state(det_state), .decision_valid, .interf,
    .n_peaks(np), .n_valid(nv)
  );
endmodule
