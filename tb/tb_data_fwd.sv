// tb_data_fwd: the tap stream carries its own sample number. After a start
// with peak age a, presented together with sample number s, the forwarded
// windows must be the samples s + L - a + k*(N+CP) ... + N-1 for each of the
// n_syms symbols, with fft_first on the first of each window, sym_idx
// counting, frame_done after the last sample, and nothing else forwarded.
// Small N, CP and L keep it short; gaps in in_valid are included.
module tb_data_fwd;
  localparam int DW = 16, N = 32, CP = 8, L = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, in_valid = 0, busy, fft_valid, fft_first, frame_done;
  logic [9:0] age = 0;
  logic [7:0] n_syms = 3, sym_idx;
  logic signed [DW-1:0] in_i = 0, in_q = 0, fft_i, fft_q;
  data_fwd #(.DW(DW), .N(N), .CP(CP), .L(L), .IW(10), .SW(8)) dut (.*);

  int exp_q [$];
  int exp_sym [$];
  bit exp_first [$];
  int dones = 0, ndone_exp = 0;

  always @(posedge clk) if (rst_n) begin
    if (fft_valid) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected sample %0d", fft_i); end
      else begin
        int e, sy;
        bit f;
        e = exp_q.pop_front(); sy = exp_sym.pop_front(); f = exp_first.pop_front();
        if (int'(fft_i) != e || fft_q !== ~fft_i || fft_first != f || int'(sym_idx) != sy) begin
          failures++;
          if (failures < 10) $display("got %0d first=%b sym=%0d, expected %0d first=%b sym=%0d", fft_i, fft_first, sym_idx, e, f, sy);
        end
      end
    end
    if (frame_done) begin
      dones++;
      checks++;
      if (exp_q.size() != 0) begin failures++; $display("frame_done with %0d samples missing", exp_q.size()); end
    end
  end

  int sn = 0;
  task automatic tick(bit st, int a, int ns, bit expect_it = 1);
    @(negedge clk);
    in_valid = ($urandom % 6) != 0 || st;
    start = st; age = 10'(a); n_syms = 8'(ns);
    in_i = DW'(sn); in_q = ~DW'(sn);
    if (st && expect_it) begin
      int first;
      first = sn + L - a;
      if (a >= L) first = sn;
      for (int s = 0; s < ns; s++)
        for (int k = 0; k < N; k++) begin
          exp_q.push_back(first + s*(N+CP) + k);
          exp_sym.push_back(s);
          exp_first.push_back(k == 0);
        end
      ndone_exp++;
    end
    if (in_valid) sn++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) tick(0, 0, 0);
    tick(1, 5, 3);
    repeat (200) tick(0, 0, 0);
    tick(1, 0, 2);
    repeat (150) tick(0, 0, 0);
    tick(1, 40, 1);           // late: forwarding starts at once
    repeat (80) tick(0, 0, 0);
    tick(1, 11, 2);
    repeat (20) tick(1, 3, 2, 0);  // starts while busy are ignored
    repeat (150) tick(0, 0, 0);
    @(negedge clk) begin in_valid = 0; start = 0; end
    repeat (5) @(posedge clk);
    checks++;
    if (dones != ndone_exp || exp_q.size() != 0) begin
      failures++; $display("%0d frames done of %0d, %0d samples missing", dones, ndone_exp, exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
