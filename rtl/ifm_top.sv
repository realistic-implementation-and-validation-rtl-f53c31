// ifm_top: macrocell/femtocell interference mitigation, macro-UE detection
// front end with the femto-BS allocation path closed through the feedback.
//
// A femto BS reusing the macro cell's 20 MHz LTE carrier can drown a macro
// UE nearby. The macro UE watches how well the cyclic prefix of each
// received OFDM symbol correlates with the end of the symbol, which it
// needs anyway for symbol timing: interference lowers the correlation
// peaks. Three such correlators run side by side, on the whole band and on
// the low and high 10 MHz halves, and the three per-frame decisions become
// a two-bit feedback telling the femto BS which half (if any) to vacate.
//
// Macro-UE side (clk = 30.72 MHz baseband, clk2x = 61.44 MHz):
//   DDC output -> align_fifo -> sync_wb_detect (synchronization, FFT
//                  window forwarding, CFO, central control, whole-band
//                  detection)
//              -> cplx_halfband_filter -> 2 x halfband_branch
//   three decisions -> feedback_gen -> feedback
// Femto-BS side (same clk for simplicity, driven by the femto's subcarrier
// timing): pn20_prbs -> qpsk_mapper -> femto_prb_alloc, whose allocation
// follows the feedback at the next femto frame. The emulated feedback link
// is a direct connection.
//
// Not included (brought out as ports instead): RF, PGA, ADC/DAC, AGC and
// DDC/DDS (gain_value in, phase_incr out), FFT/IFFT, channel estimation,
// demapping, CP insertion.
//
// Timing: the detection branches lag the input by the filter latency
// (ALIGN_DEPTH samples) plus 24 cycles; feedback is produced once per
// detected 5 ms frame, a few cycles after the last data-symbol peak.
module ifm_top
  import ifm_pkg::*;
#(
  parameter int unsigned DW           = 16,
  parameter int unsigned N            = N_FFT,
  parameter int unsigned CP           = CP_LEN,
  parameter int unsigned LW           = L_WB,
  parameter int unsigned LH           = L_HB,
  parameter int unsigned SYMS_PROFILE = PROFILE_SYMS,
  parameter int unsigned ALIGN_DEPTH  = 7,
  parameter int unsigned GW           = 8,
  parameter int unsigned SW           = 8
) (
  input  logic                 clk,
  input  logic                 clk2x,
  input  logic                 rst_n,
  // macro UE: DDC output and control registers
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  input  logic [GW-1:0]        gain_value,
  input  logic [17:0]          det_level,
  input  logic [17:0]          th_wb,
  input  logic [17:0]          th_hb,
  // macro UE outputs
  output logic                 fft_valid,
  output logic                 fft_first,
  output logic signed [DW-1:0] fft_i,
  output logic signed [DW-1:0] fft_q,
  output logic [SW-1:0]        fft_sym,
  output logic signed [15:0]   phase_incr,
  output feedback_t            feedback,
  output logic                 fb_valid,
  output logic [2:0]           ctrl_state,
  output logic [SW-1:0]        frame_len,
  output logic [15:0]          frames_fwd,
  output logic [2:0]           band_interf,   // {high, low, whole}
  output logic                 wb_peak_valid,
  output logic                 wb_peak_above,
  output logic [17:0]          wb_peak_value,
  // femto BS: subcarrier timing in, masked subcarriers out (to the IFFT)
  input  logic                 femto_frame_tick,
  input  logic [15:0]          femto_mode_period,
  input  logic                 femto_sc_req,
  input  logic                 femto_sc_first,
  output logic                 femto_sc_valid,
  output logic                 femto_sc_active,
  output logic signed [DW-1:0] femto_sc_i,
  output logic signed [DW-1:0] femto_sc_q,
  output alloc_t               femto_alloc,
  output logic                 femto_adaptive
);
  // ---------------- macro UE ----------------
  logic                 a_valid;
  logic signed [DW-1:0] a_i, a_q;
  align_fifo #(.DW(DW), .DEPTH(ALIGN_DEPTH)) u_align (
    .clk, .rst_n, .in_valid, .in_i, .in_q, .out_valid(a_valid), .out_i(a_i), .out_q(a_q)
  );

  logic                 f_valid;
  logic signed [DW-1:0] lo_i, lo_q, hi_i, hi_q;
  cplx_halfband_filter #(.DW(DW)) u_filt (
    .clk, .clk2x, .rst_n, .in_valid, .in_i, .in_q,
    .out_valid(f_valid), .low_i(lo_i), .low_q(lo_q), .high_i(hi_i), .high_q(hi_q)
  );

  logic det_start, corr_restart;
  logic wb_valid, wb_interf;
  logic frame_known, wb_m_valid;
  logic [17:0] wb_metric;
  logic [31:0] wb_divisor;
  logic signed [15:0] cfo_angle;

  sync_wb_detect #(.DW(DW), .N(N), .CP(CP), .L(LW), .SYMS_PROFILE(SYMS_PROFILE),
                   .GW(GW), .SW(SW)) u_sync (
    .clk, .rst_n, .in_valid(a_valid), .in_i(a_i), .in_q(a_q), .gain_value,
    .det_level, .th_wb, .det_start, .corr_restart, .frame_len,
    .fft_valid, .fft_first, .fft_i, .fft_q, .fft_sym, .phase_incr, .cfo_angle,
    .wb_valid, .wb_interf, .ctrl_state, .frame_known, .frames_fwd,
    .m_valid(wb_m_valid), .metric(wb_metric), .divisor(wb_divisor),
    .peak_valid(wb_peak_valid), .peak_value(wb_peak_value), .peak_above(wb_peak_above)
  );

  logic lo_valid, lo_interf, hi_valid, hi_interf;
  logic lo_mv, hi_mv;
  logic [17:0] lo_metric, hi_metric;
  logic [1:0] lo_st, hi_st;

  halfband_branch #(.DW(DW), .N(N), .CP(CP), .L(LH), .SW(SW)) u_low (
    .clk, .rst_n, .in_valid(f_valid), .in_i(lo_i), .in_q(lo_q),
    .restart(corr_restart), .start(det_start), .frame_len, .det_level, .th_hb,
    .decision_valid(lo_valid), .interf(lo_interf), .m_valid(lo_mv), .metric(lo_metric),
    .det_state(lo_st)
  );
  halfband_branch #(.DW(DW), .N(N), .CP(CP), .L(LH), .SW(SW)) u_high (
    .clk, .rst_n, .in_valid(f_valid), .in_i(hi_i), .in_q(hi_q),
    .restart(corr_restart), .start(det_start), .frame_len, .det_level, .th_hb,
    .decision_valid(hi_valid), .interf(hi_interf), .m_valid(hi_mv), .metric(hi_metric),
    .det_state(hi_st)
  );

  feedback_gen u_fb (
    .clk, .rst_n, .wb_valid, .wb_interf, .lo_valid, .lo_interf, .hi_valid, .hi_interf,
    .feedback, .fb_valid
  );
  assign band_interf = {hi_interf, lo_interf, wb_interf};

  // ---------------- femto BS ----------------
  logic       p_valid;
  logic [1:0] p_bits;
  pn20_prbs #(.B(2)) u_prbs (
    .clk, .rst_n, .load(1'b0), .seed(20'h0), .en(femto_sc_req), .valid(p_valid), .bits(p_bits)
  );

  logic                 m_valid;
  logic signed [DW-1:0] m_i, m_q;
  qpsk_mapper #(.DW(DW)) u_map (
    .clk, .rst_n, .in_valid(p_valid), .bits(p_bits), .out_valid(m_valid), .out_i(m_i), .out_q(m_q)
  );

  // the first-subcarrier mark travels with the data through the two stages
  logic [1:0] first_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) first_d <= '0;
    else        first_d <= {first_d[0], femto_sc_req && femto_sc_first};
  end

  logic [N_PRB-1:0] prb_mask;
  femto_prb_alloc #(.DW(DW)) u_alloc (
    .clk, .rst_n, .feedback, .fb_valid, .frame_tick(femto_frame_tick),
    .mode_period(femto_mode_period), .sc_valid(m_valid), .sc_first(first_d[1]),
    .sc_i(m_i), .sc_q(m_q), .out_valid(femto_sc_valid), .out_active(femto_sc_active),
    .out_i(femto_sc_i), .out_q(femto_sc_q), .alloc(femto_alloc), .adaptive(femto_adaptive),
    .prb_mask
  );
endmodule
