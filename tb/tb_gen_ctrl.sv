// tb_gen_ctrl: walks the central control through its diagram with scripted
// peak reports and checks every state and output on the way:
//   profiling lasts PROFILE_SYMS*SYM_LEN valid samples (peaks ignored);
//   S1 ignores data peaks and leaves on a silence peak;
//   S2 (from S1) goes to S3 on the first data peak; S3 counts data peaks
//   and on the next silence peak returns to S2 with frame_len set;
//   S2 (from S3) enters S4 on a data peak, pulsing fwd_start, det_start and
//   corr_restart in that very cycle; S4 ignores peaks until frame_done,
//   then S2 again (and S4 again on the next data peak after silence).
module tb_gen_ctrl;
  localparam int SYM = 40, PROF = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, peak_valid = 0, peak_above = 0, frame_done = 0, wb_valid = 0, wb_interf = 0;
  logic [2:0] state;
  logic [7:0] frame_len;
  logic frame_known, fwd_start, det_start, corr_restart, wb_interf_q;
  logic [15:0] frames_fwd;
  gen_ctrl #(.SYM_LEN(SYM), .PROFILE_SYMS(PROF), .SW(8)) dut (.*);

  int starts = 0;
  always @(posedge clk) if (rst_n) begin
    if (fwd_start) starts++;
    checks++;
    if (fwd_start !== det_start || fwd_start !== corr_restart) begin failures++; $display("start pulses differ"); end
    if (fwd_start && !(state == 3'd2 && peak_valid && peak_above)) begin failures++; $display("fwd_start outside S2 data peak"); end
  end

  task automatic expect_state(int s, string what);
    checks++;
    if (state !== 3'(s)) begin failures++; $display("%s: state %0d expected %0d", what, state, s); end
  endtask

  // one clock with the given inputs, then settle
  task automatic cyc(bit pv, bit pa, bit fd = 0);
    @(negedge clk);
    in_valid = 1; peak_valid = pv; peak_above = pa; frame_done = fd;
  endtask
  task automatic idle(int n);
    repeat (n) cyc(0, 0);
  endtask
  task automatic peak(bit above);
    cyc(1, above);
    idle(3);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // S0: peaks are ignored while profiling
    idle(10); peak(0); peak(1);
    expect_state(0, "profiling");
    idle(PROF*SYM - 20);
    @(negedge clk) in_valid = 0; peak_valid = 0;
    @(negedge clk);
    expect_state(0, "profiling with in_valid low");
    idle(2);   // samples 79 and 80 of the profile
    expect_state(0, "last profile sample");
    idle(1);
    expect_state(1, "after profiling");
    // S1
    peak(1); peak(1);
    expect_state(1, "S1 ignores data peaks");
    peak(0);
    expect_state(2, "silence found");
    peak(0);
    expect_state(2, "S2 ignores silence peaks");
    peak(1);
    expect_state(3, "first data symbol");
    repeat (6) peak(1);
    expect_state(3, "counting");
    peak(0);
    expect_state(2, "frame format known");
    checks++;
    if (frame_len != 8'd7 || !frame_known) begin failures++; $display("frame_len %0d expected 7", frame_len); end
    peak(0); peak(0);
    expect_state(2, "silence before frame");
    checks++;
    if (starts != 0) begin failures++; $display("early start"); end
    peak(1);
    expect_state(4, "forwarding");
    checks++;
    if (starts != 1) begin failures++; $display("%0d starts", starts); end
    peak(1); peak(0); peak(1);
    expect_state(4, "S4 ignores peaks");
    @(negedge clk) wb_valid = 1; wb_interf = 1;
    @(negedge clk) wb_valid = 0; wb_interf = 0;
    checks++;
    if (!wb_interf_q) begin failures++; $display("whole-band decision not recorded"); end
    cyc(0, 0, 1);
    idle(2);
    expect_state(2, "frame forwarded");
    checks++;
    if (frames_fwd != 16'd1) begin failures++; $display("frames_fwd %0d", frames_fwd); end
    peak(0); peak(1);
    expect_state(4, "next frame");
    checks++;
    if (starts != 2) begin failures++; $display("%0d starts", starts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
