// ifm_e2e: end-to-end scenario for ifm_top, shared by the reduced-size and
// the full-size testbench (it has parameters but no ports; each testbench
// is just an instance of it).
//
// A synthetic macro-cell downlink (ofdm_stim) feeds the macro-UE side of
// ifm_top, sample clock clk, filter clock clk2x = 2*clk. Interference is
// switched per 5 ms frame:
//   frames 0..2  none      (profiling, silence search, frame-format
//                           counting, first forwarded frame -> code 00)
//   frame  3     low half  -> code 01
//   frame  4     high half -> code 10
//   frame  5     whole band (white noise) -> code 11
//   frame  6     none      -> code 00
// A carrier frequency offset is applied throughout.
//
// Checked:
//   - the controller goes through every state, and the number of data
//     symbols per frame it learns is FRAME_SYMS-QUIET_SYMS;
//   - every forwarded FFT window is N consecutive received samples that
//     start inside the cyclic prefix, no earlier than L samples into it;
//     each forwarded frame has the learned number of symbols;
//   - the feedback code after each forwarded frame is the one expected
//     for that frame's interference;
//   - phase_incr equals minus the CFO phase over N samples (2*pi = 2^16),
//     within 1/2 degree;
//   - the femto side: at each of its frame ticks the allocation follows
//     the latest feedback code in the adaptive mode and is the whole band
//     in the forced mode, the two modes alternate every mode_period ticks,
//     and each symbol of 1200 subcarriers carries QPSK symbols on exactly
//     the allocated PRBs and zeros elsewhere.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module ifm_e2e #(
  parameter int N = 2048,
  parameter int CP = 512,
  parameter int LW = 467,
  parameter int LH = 416,
  parameter int PROF = 20,
  parameter bit DEFAULTS = 1,          // instantiate ifm_top with no overrides
  parameter int FRAMES = 7,
  parameter int WATCHDOG = 8000000
);
  import ifm_pkg::*;
  localparam int SYM = N + CP;
  localparam int FRAME_SYMS = 60, QUIET_FIRST = 48, QUIET_SYMS = 12;
  localparam int AMP = 4096;
  localparam real PI = 3.14159265358979;
  localparam real CFO_RAD = 0.4 / N;    // 0.4 rad over one FFT window

  logic clk = 0, clk2x = 0, rst_n = 0;
  always #2 clk2x = ~clk2x;
  always @(posedge clk2x) clk <= ~clk;
  int checks = 0, failures = 0;

  // ---------------- stimulus ----------------
  logic st_en = 0, lo_on = 0, hi_on = 0, wb_on = 0;
  logic in_valid;
  logic signed [15:0] in_i, in_q;
  int frame_no, sym_no, samp_no;
  ofdm_stim #(.N(N), .CP(CP), .FRAME_SYMS(FRAME_SYMS), .QUIET_FIRST(QUIET_FIRST),
              .QUIET_SYMS(QUIET_SYMS), .AMP(AMP)) u_stim (
    .clk, .en(st_en), .lo_on, .hi_on, .wb_on,
    .lo_amp(AMP), .hi_amp(AMP), .wb_amp(AMP / 2), .cfo(CFO_RAD),
    .valid(in_valid), .out_i(in_i), .out_q(in_q), .frame_no, .sym_no, .samp_no
  );

  // ---------------- DUT ----------------
  logic [7:0]  gain_value = 8'd10;
  logic [17:0] det_level = 18'd32768;          // 0.5
  logic [17:0] th_wb = 18'd60948;              // 0.93
  logic [17:0] th_hb = 18'd58982;              // 0.90
  logic fft_valid, fft_first, fb_valid;
  logic signed [15:0] fft_i, fft_q, phase_incr;
  logic [7:0] fft_sym, frame_len;
  feedback_t feedback;
  logic [2:0] ctrl_state, band_interf;
  logic [15:0] frames_fwd;
  logic wb_peak_valid, wb_peak_above;
  logic [17:0] wb_peak_value;
  logic femto_frame_tick = 0, femto_sc_req = 0, femto_sc_first = 0;
  logic [15:0] femto_mode_period = 16'd3;
  logic femto_sc_valid, femto_sc_active, femto_adaptive;
  logic signed [15:0] femto_sc_i, femto_sc_q;
  alloc_t femto_alloc;

  if (DEFAULTS) begin : g_dut
    ifm_top dut (.*);
  end else begin : g_dut
    ifm_top #(.N(N), .CP(CP), .LW(LW), .LH(LH), .SYMS_PROFILE(PROF)) dut (.*);
  end

  // ---------------- received-sample history ----------------
  localparam int HIST = 4 * SYM;
  logic signed [15:0] h_i [HIST];
  logic signed [15:0] h_q [HIST];
  int h_samp [HIST];
  int h_frame [HIST];
  int n_in = 0;
  always @(posedge clk) if (in_valid) begin
    h_i[n_in % HIST] <= in_i;
    h_q[n_in % HIST] <= in_q;
    h_samp[n_in % HIST] <= samp_no;
    h_frame[n_in % HIST] <= frame_no;
    n_in <= n_in + 1;
  end

  // ---------------- mechanism counters ----------------
  int c_state [5] = '{0, 0, 0, 0, 0};
  int c_fb [4] = '{0, 0, 0, 0};
  int c_alloc [4] = '{0, 0, 0, 0};
  int c_restart = 0, c_wb_int = 0, c_lo_int = 0, c_hi_int = 0, c_cfo = 0;
  int c_windows = 0, c_frames = 0, c_toggles = 0, c_gain = 0, c_peaks_quiet = 0;
  logic [2:0] prev_state = 0;
  logic [15:0] prev_ff = 0;

  // per-frame bookkeeping of the FFT stream
  int win_pos = 0, win_base = 0, win_syms = 0;
  bit in_window = 0;

  always @(negedge clk) if (rst_n) begin
    if (ctrl_state != prev_state) c_state[ctrl_state]++;
    prev_state <= ctrl_state;
    if (g_dut.dut.u_sync.corr_restart) c_restart++;
    if (g_dut.dut.u_sync.u_cordic.done) c_cfo++;
    if (wb_peak_valid && !wb_peak_above) c_peaks_quiet++;
    if (g_dut.dut.wb_valid && g_dut.dut.wb_interf) c_wb_int++;
    if (g_dut.dut.lo_valid && g_dut.dut.lo_interf) c_lo_int++;
    if (g_dut.dut.hi_valid && g_dut.dut.hi_interf) c_hi_int++;
    if (frames_fwd != prev_ff) begin
      c_frames++;
      checks++;
      if (win_syms != int'(frame_len)) begin
        failures++; $display("forwarded frame had %0d symbols, frame length %0d", win_syms, frame_len);
      end
      win_syms = 0;
    end
    prev_ff <= frames_fwd;
  end

  // FFT window check: first sample located in the history by value, the
  // rest must follow it sample by sample
  always @(negedge clk) if (rst_n && fft_valid) begin
    if (fft_first) begin
      int found;
      found = -1;
      for (int k = 1; k < HIST && found < 0; k++) begin
        int j;
        j = (n_in - k) % HIST;
        if (n_in - k >= 0 && h_i[j] == fft_i && h_q[j] == fft_q) found = n_in - k;
      end
      checks++;
      if (found < 0) begin
        failures++; $display("FFT window start not found among received samples");
        in_window = 0;
      end else begin
        int sp;
        sp = h_samp[found % HIST];
        checks++;
        if (sp < LW - 2 || sp > CP) begin
          failures++; $display("FFT window starts %0d samples into the symbol", sp);
        end
        win_base = found; win_pos = 0; in_window = 1; c_windows++; win_syms++;
      end
    end else if (in_window) begin
      win_pos++;
      checks++;
      if (fft_i != h_i[(win_base + win_pos) % HIST] || fft_q != h_q[(win_base + win_pos) % HIST]) begin
        failures++; $display("FFT window sample %0d differs", win_pos);
        in_window = 0;
      end
    end
  end

  // feedback check
  function automatic feedback_t expected_fb(int f);
    case (f)
      3: return FB_LOW;
      4: return FB_HIGH;
      5: return FB_WHOLE;
      default: return FB_NONE;
    endcase
  endfunction
  int fb_frame;
  always @(negedge clk) if (rst_n && fb_valid) begin
    // the decision completes just after the last sample of the frame's
    // last data symbol, so it belongs to the frame now being received
    fb_frame = frame_no;
    c_fb[int'(feedback)]++;
    checks++;
    if (feedback != expected_fb(fb_frame)) begin
      failures++; $display("frame %0d: feedback %b, expected %b (interf %b)",
                           fb_frame, feedback, expected_fb(fb_frame), band_interf);
    end else $display("frame %0d: feedback %b", fb_frame, feedback);
  end

  // ---------------- femto side ----------------
  feedback_t m_fb = FB_NONE;
  always @(negedge clk) if (rst_n && fb_valid) m_fb = feedback;

  function automatic int active_count(alloc_t a);
    case (a)
      ALLOC_WHOLE: return 1200;
      ALLOC_LOW, ALLOC_HIGH: return 600;
      default: return 0;
    endcase
  endfunction

  initial begin : femto
    bit m_adapt;
    int m_cnt;
    alloc_t m_alloc;
    m_adapt = 1; m_cnt = 0;
    wait (rst_n);
    forever begin
      int act, outs, bad;
      bit prev_adapt;
      @(negedge clk) femto_frame_tick = 1;
      prev_adapt = m_adapt;
      if (m_cnt >= int'(femto_mode_period) - 1) begin m_cnt = 0; m_adapt = !m_adapt; end
      else m_cnt++;
      if (m_adapt != prev_adapt) c_toggles++;
      m_alloc = m_adapt ? alloc_from_feedback(m_fb) : ALLOC_WHOLE;
      @(negedge clk) femto_frame_tick = 0;
      checks += 2;
      if (femto_alloc != m_alloc || femto_adaptive != m_adapt) begin
        failures++; $display("femto: alloc %s adaptive %b, expected %s %b",
                             femto_alloc.name(), femto_adaptive, m_alloc.name(), m_adapt);
      end
      c_alloc[int'(femto_alloc)]++;
      // one symbol of subcarriers
      act = 0; outs = 0; bad = 0;
      for (int k = 0; k < 1200 + 4; k++) begin
        femto_sc_req = (k < 1200);
        femto_sc_first = (k == 0);
        @(posedge clk); #1;
        if (femto_sc_valid) begin
          outs++;
          if (femto_sc_active) begin
            act++;
            if ((femto_sc_i != 16'sd11585 && femto_sc_i != -16'sd11585) ||
                (femto_sc_q != 16'sd11585 && femto_sc_q != -16'sd11585)) bad++;
          end else if (femto_sc_i != 0 || femto_sc_q != 0) bad++;
        end
        @(negedge clk);
      end
      femto_sc_req = 0; femto_sc_first = 0;
      checks += 3;
      if (outs != 1200) begin failures++; $display("femto: %0d subcarriers out", outs); end
      if (act != active_count(m_alloc)) begin
        failures++; $display("femto: %0d active subcarriers for %s", act, m_alloc.name());
      end
      if (bad != 0) begin failures++; $display("femto: %0d wrong subcarrier values", bad); end
      repeat (SYM) @(negedge clk);
    end
  end

  // ---------------- scenario ----------------
  initial begin
    real exp_deg, got_deg, err;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    @(negedge clk) st_en = 1;
    // a gain change during profiling restarts the divisor maximum
    repeat (SYM) @(negedge clk);
    gain_value = 8'd12; c_gain++;
    while (frame_no < FRAMES) begin
      @(negedge clk);
      lo_on = (frame_no == 3);
      hi_on = (frame_no == 4);
      wb_on = (frame_no == 5);
    end
    // ---- end-of-run checks ----
    checks++;
    if (frame_len != 8'(FRAME_SYMS - QUIET_SYMS)) begin
      failures++; $display("learned frame length %0d", frame_len);
    end
    exp_deg = CFO_RAD * N * 180.0 / PI;
    got_deg = -real'(phase_incr) * 360.0 / 65536.0;
    err = got_deg - exp_deg;
    checks++;
    if (err > 0.5 || err < -0.5) begin
      failures++; $display("CFO: phase_incr %0d = %f deg, expected %f deg", phase_incr, got_deg, exp_deg);
    end
    $display("states S0..S4 entered: %0d %0d %0d %0d %0d", c_state[0], c_state[1], c_state[2], c_state[3], c_state[4]);
    $display("quiet-period peaks %0d, correlation restarts %0d, forwarded frames %0d, FFT windows %0d",
             c_peaks_quiet, c_restart, c_frames, c_windows);
    $display("interference found: whole %0d low %0d high %0d; feedback codes 00:%0d 01:%0d 10:%0d 11:%0d",
             c_wb_int, c_lo_int, c_hi_int, c_fb[0], c_fb[1], c_fb[2], c_fb[3]);
    $display("femto allocations whole %0d low %0d high %0d quiet %0d, mode changes %0d, CFO updates %0d",
             c_alloc[0], c_alloc[1], c_alloc[2], c_alloc[3], c_toggles, c_cfo);
    // every mechanism must have happened
    checks += 20;
    if (c_state[1] == 0 || c_state[2] == 0 || c_state[3] == 0 || c_state[4] == 0) begin
      failures++; $display("a control state was never entered");
    end
    if (c_peaks_quiet == 0) begin failures++; $display("no quiet-period peak"); end
    if (c_restart == 0) begin failures++; $display("no correlation restart"); end
    if (c_frames < FRAMES - 3) begin failures++; $display("too few forwarded frames"); end
    if (c_windows == 0) begin failures++; $display("no FFT window"); end
    if (c_wb_int == 0) begin failures++; $display("no whole-band interference found"); end
    if (c_lo_int == 0) begin failures++; $display("no low-band interference found"); end
    if (c_hi_int == 0) begin failures++; $display("no high-band interference found"); end
    for (int k = 0; k < 4; k++) if (c_fb[k] == 0) begin failures++; $display("feedback code %0d never sent", k); end
    for (int k = 0; k < 4; k++) if (c_alloc[k] == 0) begin failures++; $display("femto allocation %0d never used", k); end
    if (c_toggles == 0) begin failures++; $display("no femto mode change"); end
    if (c_cfo == 0) begin failures++; $display("no CFO estimate"); end
    if (c_gain == 0) begin failures++; $display("no gain change"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
