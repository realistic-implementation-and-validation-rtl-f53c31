// tb_cordic_atan: angles of random vectors over all four quadrants and of
// the axes, compared with atan2 computed in real arithmetic; the 16-bit
// result (2*pi = 65536) must be within 2 LSB, phase_incr must be its
// negation, and done must rise at the 19th clock edge after the edge that
// takes start (seen at the 20th falling edge counted here).
module tb_cordic_atan;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, busy, done;
  logic signed [31:0] x = 0, y = 0;
  logic signed [15:0] angle, phase_incr;
  cordic_atan dut (.*);

  task automatic one(longint xv, longint yv);
    real a;
    int e, d, n;
    @(negedge clk);
    x = 32'(xv); y = 32'(yv); start = 1;
    @(negedge clk) start = 0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    a = $atan2(real'(yv), real'(xv)) / (2.0 * 3.14159265358979) * 65536.0;
    e = int'(a);
    if (e >= 32768) e -= 65536;
    d = int'(angle) - e;
    if (d > 32768) d -= 65536;
    if (d < -32768) d += 65536;
    checks += 3;
    if (d > 2 || d < -2) begin failures++; $display("(%0d,%0d): %0d expected %0d", xv, yv, angle, e); end
    if (phase_incr !== -angle) begin failures++; $display("phase_incr %0d", phase_incr); end
    if (n != 20) begin failures++; $display("done after %0d cycles", n); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(1000, 0); one(0, 1000); one(-1000, 0); one(0, -1000);
    one(2147483000, 2147483000); one(-2147483000, -2147483000);
    for (int k = 0; k < 200; k++) begin
      longint xv, yv;
      xv = longint'($signed($urandom)) >>> ($urandom % 20);
      yv = longint'($signed($urandom)) >>> ($urandom % 20);
      if (xv == 0 && yv == 0) xv = 1;
      one(xv, yv);
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
