// sync_wb_detect: joint symbol synchronization and whole-band interference
// detection of the macro UE.
//
// One CP correlation serves both jobs. cp_corr keeps the recursive sums of
// the 467-sample window at lag 2048 over its delay memory, corr_metric turns
// them into the normalised metric |dn|^2/(ds0*ds1) (Q2.16), and peak_detect
// reports one peak per OFDM symbol. Each peak is classified by its divisor
// (divisor_profile): a large divisor means a data symbol, a small one a
// symbol of the quasi-quiet period. gen_ctrl uses this to find the 5 ms
// frame, its number of data symbols and the first data symbol of each
// frame; at that symbol it starts data_fwd, which sends the 2048-sample FFT
// window of every data symbol of the frame to the FFT, restarts the
// correlation sums, and starts the whole-band band_detect, which
// declares interference when a data-symbol peak of the frame stays below
// th_wb. cordic_atan takes the angle of dn at every data-symbol peak for
// the fractional CFO correction of the DDS.
//
// Interface: in_* is the time-aligned DDC output (one sample per clk when
// in_valid). det_start, corr_restart and frame_len go to the half-band
// branches. fft_* is the forwarded symbol stream, phase_incr the DDS
// correction, wb_valid/wb_interf the whole-band decision per frame.
// Metric, divisor and peak outputs are brought out for monitoring.
//
// Timing: the metric lags the input by 24 clk cycles (3 in cp_corr, 21 in
// corr_metric); the forwarded stream is the input delayed by N+L+24 cycles.
module sync_wb_detect
  import ifm_pkg::*;
#(
  parameter int unsigned DW           = 16,
  parameter int unsigned N            = N_FFT,
  parameter int unsigned CP           = CP_LEN,
  parameter int unsigned L            = L_WB,
  parameter int unsigned SYMS_PROFILE = PROFILE_SYMS,
  parameter int unsigned GW           = 8,
  parameter int unsigned SW           = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  input  logic [GW-1:0]        gain_value,
  input  logic [17:0]          det_level,   // peak detection level, Q2.16
  input  logic [17:0]          th_wb,       // whole-band threshold, Q2.16
  // to the half-band branches
  output logic                 det_start,
  output logic                 corr_restart,
  output logic [SW-1:0]        frame_len,
  // to the FFT and the DDS
  output logic                 fft_valid,
  output logic                 fft_first,
  output logic signed [DW-1:0] fft_i,
  output logic signed [DW-1:0] fft_q,
  output logic [SW-1:0]        fft_sym,
  output logic signed [15:0]   phase_incr,
  output logic signed [15:0]   cfo_angle,
  // whole-band decision and status
  output logic                 wb_valid,
  output logic                 wb_interf,
  output logic [2:0]           ctrl_state,
  output logic                 frame_known,
  output logic [15:0]          frames_fwd,
  output logic                 m_valid,
  output logic [17:0]          metric,
  output logic [31:0]          divisor,
  output logic                 peak_valid,
  output logic [17:0]          peak_value,
  output logic                 peak_above
);
  localparam int unsigned AW = 2*DW + 1 + $clog2(L);
  localparam int unsigned EW = 2*DW + $clog2(L);

  // correlation
  logic                 c_valid;
  logic signed [AW-1:0] dn_re, dn_im;
  logic        [EW-1:0] ds0, ds1;
  logic signed [DW-1:0] tap_i, tap_q;

  cp_corr #(.DW(DW), .N(N), .L(L)) u_corr (
    .clk, .rst_n, .restart(corr_restart), .in_valid, .in_i, .in_q,
    .out_valid(c_valid), .dn_re, .dn_im, .ds0, .ds1, .tap_i, .tap_q
  );

  logic signed [31:0]   dn_re_s, dn_im_s;
  logic signed [DW-1:0] mt_i, mt_q;

  corr_metric #(.DW(DW), .AW(AW), .EW(EW)) u_metric (
    .clk, .rst_n, .in_valid(c_valid), .dn_re, .dn_im, .ds0, .ds1, .tap_i, .tap_q,
    .out_valid(m_valid), .metric, .divisor, .dn_re_s, .dn_im_s,
    .out_tap_i(mt_i), .out_tap_q(mt_q)
  );

  // peaks
  logic [9:0]         peak_age;
  logic [31:0]        peak_div;
  logic signed [31:0] pk_re, pk_im;

  peak_detect #(.QW(18), .IW(10)) u_peak (
    .clk, .rst_n, .in_valid(m_valid), .metric, .divisor, .dn_re(dn_re_s), .dn_im(dn_im_s),
    .level(det_level), .peak_valid, .peak_value, .peak_age, .peak_div,
    .peak_dn_re(pk_re), .peak_dn_im(pk_im)
  );

  logic [31:0] max_div, div_th;
  logic        gain_changed;
  divisor_profile #(.GW(GW), .TH_SHIFT(1)) u_prof (
    .clk, .rst_n, .clear(1'b0), .in_valid(m_valid), .divisor, .gain_value,
    .peak_div, .max_div, .threshold(div_th), .peak_above, .gain_changed
  );

  // CFO from every data-symbol peak
  logic cordic_busy, cordic_done;
  cordic_atan #(.XW(32), .ITER(18)) u_cordic (
    .clk, .rst_n, .start(peak_valid && peak_above), .x(pk_re), .y(pk_im),
    .busy(cordic_busy), .done(cordic_done), .angle(cfo_angle), .phase_incr
  );

  // central control
  logic fwd_start, frame_done, fwd_busy;
  gen_ctrl #(.SYM_LEN(N + CP), .PROFILE_SYMS(SYMS_PROFILE), .SW(SW)) u_ctrl (
    .clk, .rst_n, .in_valid(m_valid), .peak_valid, .peak_above, .frame_done,
    .wb_valid, .wb_interf, .state(ctrl_state), .frame_len, .frame_known,
    .fwd_start, .det_start, .corr_restart, .wb_interf_q(), .frames_fwd
  );

  data_fwd #(.DW(DW), .N(N), .CP(CP), .L(L), .IW(10), .SW(SW)) u_fwd (
    .clk, .rst_n, .start(fwd_start), .age(peak_age), .n_syms(frame_len),
    .in_valid(m_valid), .in_i(mt_i), .in_q(mt_q), .busy(fwd_busy),
    .fft_valid, .fft_first, .fft_i, .fft_q, .sym_idx(fft_sym), .frame_done
  );

  // whole-band interference detection
  logic [1:0]    wb_state;
  logic [SW-1:0] wb_np, wb_nv;
  band_detect #(.QW(18), .SYM_LEN(N + CP), .SW(SW)) u_wb (
    .clk, .rst_n, .in_valid(m_valid), .metric, .level(det_level), .threshold(th_wb),
    .start(det_start), .frame_len, .state(wb_state), .decision_valid(wb_valid),
    .interf(wb_interf), .n_peaks(wb_np), .n_valid(wb_nv)
  );
endmodule
