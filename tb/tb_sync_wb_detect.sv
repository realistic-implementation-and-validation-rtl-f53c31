// tb_sync_wb_detect: the whole-band synchronization and detection path on
// its own, at a reduced symbol size (N = 512, CP = 256, window 211,
// 4 profiling symbols), fed by the synthetic downlink of ofdm_stim with a
// carrier frequency offset. Frames 0..3 are clean, frame 4 carries
// whole-band noise, frame 5 is clean again.
// Checks: the controller's states in order (S0 -> S1 -> S2 -> S3 -> S2 ->
// S4 ...), the learned frame length (48 data symbols), that every FFT
// window is N consecutive received samples starting between L and CP
// samples into its symbol, the whole-band decision of each forwarded frame,
// that det_start/corr_restart pulse once per forwarded frame, and the CFO
// estimate (phase_incr) within 1/2 degree.
module tb_sync_wb_detect;
  import ifm_pkg::*;
  localparam int N = 512, CP = 256, L = 211, SYM = N + CP;
  localparam real CFO_RAD = -0.7 / N;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic st_en = 0, wb_on = 0;
  logic in_valid;
  logic signed [15:0] in_i, in_q;
  int frame_no, sym_no, samp_no;
  ofdm_stim #(.N(N), .CP(CP), .AMP(4096)) u_stim (
    .clk, .en(st_en), .lo_on(1'b0), .hi_on(1'b0), .wb_on,
    .lo_amp(0), .hi_amp(0), .wb_amp(2048), .cfo(CFO_RAD),
    .valid(in_valid), .out_i(in_i), .out_q(in_q), .frame_no, .sym_no, .samp_no
  );

  logic [7:0] gain_value = 8'd5;
  logic [17:0] det_level = 18'd32768, th_wb = 18'd60948;
  logic det_start, corr_restart, fft_valid, fft_first, wb_valid, wb_interf, frame_known;
  logic m_valid, peak_valid, peak_above;
  logic [7:0] frame_len, fft_sym;
  logic signed [15:0] fft_i, fft_q, phase_incr, cfo_angle;
  logic [2:0] ctrl_state;
  logic [15:0] frames_fwd;
  logic [17:0] metric, peak_value;
  logic [31:0] divisor;
  sync_wb_detect #(.N(N), .CP(CP), .L(L), .SYMS_PROFILE(4)) dut (.*);

  // received-sample history
  localparam int HIST = 3 * SYM;
  logic signed [15:0] h_i [HIST];
  logic signed [15:0] h_q [HIST];
  int h_samp [HIST];
  int n_in = 0;
  always @(posedge clk) if (in_valid) begin
    h_i[n_in % HIST] <= in_i; h_q[n_in % HIST] <= in_q; h_samp[n_in % HIST] <= samp_no;
    n_in <= n_in + 1;
  end

  // state sequence
  logic [2:0] seq [$];
  logic [2:0] prev_st = 0;
  int starts = 0, restarts = 0, decisions = 0, windows = 0;
  int win_base = 0, win_pos = 0;
  bit in_win = 0;
  always @(negedge clk) if (rst_n) begin
    if (ctrl_state != prev_st) seq.push_back(ctrl_state);
    prev_st <= ctrl_state;
    if (det_start) starts++;
    if (corr_restart) restarts++;
    if (wb_valid) begin
      decisions++;
      checks++;
      if (wb_interf != (frame_no == 4)) begin
        failures++; $display("frame %0d: whole-band decision %b", frame_no, wb_interf);
      end
    end
    if (fft_valid) begin
      if (fft_first) begin
        int found;
        found = -1;
        for (int k = 1; k < HIST && found < 0; k++)
          if (n_in - k >= 0 && h_i[(n_in - k) % HIST] == fft_i && h_q[(n_in - k) % HIST] == fft_q)
            found = n_in - k;
        checks += 2;
        if (found < 0) begin failures++; $display("window start not found"); in_win = 0; end
        else begin
          if (h_samp[found % HIST] < L - 2 || h_samp[found % HIST] > CP) begin
            failures++; $display("window starts at %0d", h_samp[found % HIST]);
          end
          win_base = found; win_pos = 0; in_win = 1; windows++;
        end
      end else if (in_win) begin
        win_pos++;
        checks++;
        if (fft_i != h_i[(win_base + win_pos) % HIST] || fft_q != h_q[(win_base + win_pos) % HIST]) begin
          failures++; $display("window sample %0d differs", win_pos); in_win = 0;
        end
      end
    end
  end

  initial begin
    real exp_deg, got_deg;
    logic [2:0] want [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) st_en = 1;
    while (frame_no < 6) begin
      @(negedge clk);
      wb_on = (frame_no == 4);
    end
    checks += 5;
    if (frame_len != 8'd48) begin failures++; $display("frame length %0d", frame_len); end
    if (!frame_known) begin failures++; $display("frame format not known"); end
    if (starts != int'(frames_fwd) + 1 && starts != int'(frames_fwd)) begin
      failures++; $display("%0d starts for %0d frames", starts, frames_fwd);
    end
    if (restarts != starts) begin failures++; $display("%0d restarts", restarts); end
    if (decisions < 3 || windows < 3 * 48) begin
      failures++; $display("%0d decisions, %0d windows", decisions, windows);
    end
    want = '{3'd1, 3'd2, 3'd3, 3'd2, 3'd4, 3'd2, 3'd4};
    checks++;
    for (int k = 0; k < want.size(); k++)
      if (k >= seq.size() || seq[k] != want[k]) begin
        failures++; $display("state sequence differs at step %0d", k); break;
      end
    exp_deg = CFO_RAD * N * 180.0 / PI;
    got_deg = -real'(phase_incr) * 360.0 / 65536.0;
    checks++;
    if (got_deg - exp_deg > 0.5 || got_deg - exp_deg < -0.5) begin
      failures++; $display("CFO %f deg, expected %f", got_deg, exp_deg);
    end
    $display("frames forwarded %0d, windows %0d, decisions %0d", frames_fwd, windows, decisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
