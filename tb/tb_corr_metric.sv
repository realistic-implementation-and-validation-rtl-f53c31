// tb_corr_metric: checks the normalised correlation metric against a
// reference computed in the testbench from the same inputs:
//   a = dn >>> 10, d0 = ds0 >> 10, d1 = ds1 >> 10 (42/41-bit sums to 32 bits)
//   metric = min(floor((a_re^2 + a_im^2) * 2^16 / (d0*d1)), 2^18-1)
//   divisor = (d0*d1) >> 30
// plus the aligned side band (scaled dn, tap) and the 21-cycle latency.
module tb_corr_metric;
  localparam int DW = 16, AW = 42, EW = 41;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  logic signed [AW-1:0] dn_re = 0, dn_im = 0;
  logic [EW-1:0] ds0 = 0, ds1 = 0;
  logic signed [DW-1:0] tap_i = 0, tap_q = 0;
  logic out_valid;
  logic [17:0] metric;
  logic [31:0] divisor;
  logic signed [31:0] dn_re_s, dn_im_s;
  logic signed [DW-1:0] out_tap_i, out_tap_q;

  corr_metric #(.DW(DW), .AW(AW), .EW(EW)) dut (.*);

  typedef struct { logic [17:0] m; logic [31:0] d; logic signed [31:0] r, i; logic signed [15:0] ti, tq; int c; } exp_t;
  exp_t q [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    if (q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = q.pop_front();
      checks += 3;
      if (metric !== e.m) begin failures++; if (failures < 10) $display("metric %h expected %h", metric, e.m); end
      if (divisor !== e.d || dn_re_s !== e.r || dn_im_s !== e.i || out_tap_i !== e.ti || out_tap_q !== e.tq) begin
        failures++; if (failures < 10) $display("side band mismatch");
      end
      if (cyc - e.c != 21) begin failures++; if (failures < 10) $display("latency %0d", cyc - e.c); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      exp_t e;
      logic [63:0] a0, a1, num, den;
      logic signed [31:0] ar, ai;
      logic [127:0] w;
      real frac, ph;
      @(negedge clk);
      in_valid = (t % 9 != 4);
      ds0 = EW'({$urandom, $urandom}) >> ($urandom % 12);
      ds1 = EW'({$urandom, $urandom}) >> ($urandom % 12);
      // |dn| up to 1.05 * sqrt(ds0*ds1), random phase
      frac = real'($urandom % 1050) / 1000.0;
      ph = real'($urandom % 6283) / 1000.0;
      dn_re = AW'(longint'(frac * $sqrt(real'(ds0) * real'(ds1)) * $cos(ph)));
      dn_im = AW'(longint'(frac * $sqrt(real'(ds0) * real'(ds1)) * $sin(ph)));
      tap_i = DW'($urandom); tap_q = DW'($urandom);
      if (in_valid) begin
        ar = 32'(dn_re >>> 10); ai = 32'(dn_im >>> 10);
        a0 = 64'(ds0 >> 10); a1 = 64'(ds1 >> 10);
        num = 64'(longint'(ar) * longint'(ar)) + 64'(longint'(ai) * longint'(ai));
        den = a0 * a1;
        if (num == 0) e.m = 0;
        else if (den == 0) e.m = '1;
        else begin
          w = ({64'd0, num} << 16) / {64'd0, den};
          e.m = (w > 128'h3FFFF) ? 18'h3FFFF : w[17:0];
        end
        e.d = 32'(den >> 30); e.r = ar; e.i = ai; e.ti = tap_i; e.tq = tap_q; e.c = cyc;
        q.push_back(e);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("missing outputs"); end
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
