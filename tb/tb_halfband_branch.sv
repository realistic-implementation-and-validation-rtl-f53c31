// tb_halfband_branch: one half-band detection branch (CP correlation with
// the shorter window, metric, band decision) at a reduced symbol size
// (N = 512, CP = 256, window 160). The branch is fed the synthetic downlink
// of ofdm_stim directly (the filter is tested on its own). start and
// restart are given, as the central control would, a fixed time after the
// peak of each frame's first data symbol (150 samples into the second
// symbol), with a frame length of 48. Frames 1 and 3 carry noise in the
// band, frames 0, 2 and 4 are clean.
// Checks: one decision per frame, 48 peaks counted, the decision itself,
// and that the decision arrives within the frame's data symbols plus one.
module tb_halfband_branch;
  localparam int N = 512, CP = 256, L = 160, SYM = N + CP;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic st_en = 0, wb_on = 0;
  logic in_valid;
  logic signed [15:0] in_i, in_q;
  int frame_no, sym_no, samp_no;
  ofdm_stim #(.N(N), .CP(CP), .AMP(4096)) u_stim (
    .clk, .en(st_en), .lo_on(1'b0), .hi_on(1'b0), .wb_on,
    .lo_amp(0), .hi_amp(0), .wb_amp(2048), .cfo(0.0),
    .valid(in_valid), .out_i(in_i), .out_q(in_q), .frame_no, .sym_no, .samp_no
  );

  logic restart = 0, start = 0, decision_valid, interf, m_valid;
  logic [7:0] frame_len = 8'd48;
  logic [17:0] det_level = 18'd32768, th_hb = 18'd58982, metric;
  logic [1:0] det_state;
  halfband_branch #(.N(N), .CP(CP), .L(L)) dut (.*);

  int decisions = 0, last_frame = -1;
  always @(negedge clk) if (rst_n && decision_valid) begin
    decisions++;
    checks += 4;
    if (interf != (frame_no == 1 || frame_no == 3)) begin
      failures++; $display("frame %0d: decision %b", frame_no, interf);
    end
    if (dut.u_det.n_peaks != 8'd48) begin failures++; $display("%0d peaks", dut.u_det.n_peaks); end
    if (frame_no == last_frame) begin failures++; $display("two decisions in frame %0d", frame_no); end
    if (sym_no > 49) begin failures++; $display("decision in symbol %0d", sym_no); end
    last_frame = frame_no;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) st_en = 1;
    while (frame_no < 5) begin
      @(negedge clk);
      wb_on = (frame_no == 1 || frame_no == 3);
      start = (sym_no == 1 && samp_no == 150);
      restart = start;
    end
    start = 0; restart = 0;
    checks++;
    if (decisions != 5) begin failures++; $display("%0d decisions", decisions); end
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
