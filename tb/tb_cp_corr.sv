// tb_cp_corr: checks the recursive correlation sums against a direct sum
// over the window, for a random stream with gaps in in_valid and restarts.
// Reference: for the k-th valid sample x[k], with r the index of the
// latest restart sample (or 0), w = min(L, k - r + 1):
//   dn  = sum_{l<w} conj(x[k-N-l]) x[k-l],  ds0 = sum |x[k-N-l]|^2,
//   ds1 = sum |x[k-l]|^2, with x[j] = 0 for j < 0, and tap = x[k-N-L].
// Small N and L keep the direct sums short. Also checks the 3-cycle latency.
module tb_cp_corr;
  localparam int N = 64, L = 20, DW = 16;
  localparam int AW = 2*DW + 1 + $clog2(L), EW = 2*DW + $clog2(L);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic restart = 0, in_valid = 0;
  logic signed [DW-1:0] in_i = 0, in_q = 0;
  logic out_valid;
  logic signed [AW-1:0] dn_re, dn_im;
  logic [EW-1:0] ds0, ds1;
  logic signed [DW-1:0] tap_i, tap_q;

  cp_corr #(.DW(DW), .N(N), .L(L)) dut (.*);

  longint xi [$], xq [$];
  int restart_at = 0;
  // expected values queue, one entry per valid input
  longint e_re [$], e_im [$], e0 [$], e1 [$], eti [$], etq [$];
  int     e_cyc [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint xs_i(int j); return (j < 0) ? 0 : xi[j]; endfunction
  function automatic longint xs_q(int j); return (j < 0) ? 0 : xq[j]; endfunction

  task automatic push_expect(int k);
    longint sr, si, s0, s1;
    int w;
    sr = 0; si = 0; s0 = 0; s1 = 0;
    w = k - restart_at + 1;
    if (w > L) w = L;
    for (int l = 0; l < w; l++) begin
      longint ar, ai, br, bi;
      ar = xs_i(k-l); ai = xs_q(k-l); br = xs_i(k-N-l); bi = xs_q(k-N-l);
      sr += br*ar + bi*ai;
      si += br*ai - bi*ar;
      s0 += br*br + bi*bi;
      s1 += ar*ar + ai*ai;
    end
    e_re.push_back(sr); e_im.push_back(si); e0.push_back(s0); e1.push_back(s1);
    eti.push_back(xs_i(k-N-L)); etq.push_back(xs_q(k-N-L));
    e_cyc.push_back(cyc);
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    if (e_re.size() == 0) begin
      failures++; $display("unexpected output");
    end else begin
      longint r, i, a, b, ti, tq;
      int c;
      r = e_re.pop_front(); i = e_im.pop_front(); a = e0.pop_front(); b = e1.pop_front();
      ti = eti.pop_front(); tq = etq.pop_front();
      c = e_cyc.pop_front();
      checks++;
      if (longint'(dn_re) != r || longint'(dn_im) != i || longint'(ds0) != a || longint'(ds1) != b) begin
        failures++;
        if (failures < 10) $display("cyc %0d: dn=(%0d,%0d) ds0=%0d ds1=%0d expected (%0d,%0d) %0d %0d",
                                    cyc, dn_re, dn_im, ds0, ds1, r, i, a, b);
      end
      checks++;
      if (longint'(tap_i) != ti || longint'(tap_q) != tq) begin
        failures++; if (failures < 10) $display("tap mismatch");
      end
      checks++;
      if (cyc - c != 3) begin
        failures++; if (failures < 10) $display("latency %0d", cyc - c);
      end
    end
  end

  initial begin
    int k;
    k = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1200; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 8) != 0;
      restart  = (t == 500) || (t == 800 && !in_valid) || (t == 1000);
      in_i = DW'($urandom); in_q = DW'($urandom);
      if (t % 200 < 20) begin in_i = 16'sh7fff; in_q = -16'sh8000; end
      if (restart && !in_valid) restart_at = k;
      if (in_valid) begin
        xi.push_back(longint'(in_i)); xq.push_back(longint'(in_q));
        if (restart) restart_at = k;
        push_expect(k);
        k++;
      end
    end
    @(negedge clk) begin in_valid = 0; restart = 0; end
    repeat (10) @(posedge clk);
    checks++;
    if (e_re.size() != 0) begin failures++; $display("missing outputs"); end
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
