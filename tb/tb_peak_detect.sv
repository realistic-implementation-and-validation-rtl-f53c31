// tb_peak_detect: feeds random bursts (triangular and noisy) of metric
// values above a level (with dips between half the level and the level,
// which must not end a burst), and checks that exactly one report per burst
// arrives, one cycle after the first below-level sample, with the burst's
// maximum (the first one if repeated), its divisor and dn, and the number
// of samples between the maximum and the first sample below half the level.
module tb_peak_detect;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  logic [17:0] metric = 0, level = 18'd32768, peak_value;
  logic [31:0] divisor = 0, peak_div;
  logic signed [31:0] dn_re = 0, dn_im = 0, peak_dn_re, peak_dn_im;
  logic peak_valid;
  logic [9:0] peak_age;
  peak_detect dut (.*);

  typedef struct { logic [17:0] v; logic [9:0] age; logic [31:0] d; logic signed [31:0] r; } exp_t;
  exp_t q [$];
  int reports = 0, due = -1, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (peak_valid) begin
      exp_t e;
      reports++;
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected report"); end
      else begin
        e = q.pop_front();
        if (peak_value !== e.v || peak_age !== e.age || peak_div !== e.d || peak_dn_re !== e.r || peak_dn_im !== -e.r) begin
          failures++;
          $display("report v=%0d age=%0d d=%0d, expected v=%0d age=%0d d=%0d", peak_value, peak_age, peak_div, e.v, e.age, e.d);
        end
        checks++;
        if (cyc != due) begin failures++; $display("report at %0d, expected %0d", cyc, due); end
      end
    end
  end

  task automatic sample(logic [17:0] m, logic [31:0] d);
    @(negedge clk);
    in_valid = 1; metric = m; divisor = d; dn_re = 32'(d) + 5; dn_im = -(32'(d) + 5);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 40; b++) begin
      int len, top, since;
      exp_t e;
      logic [17:0] m;
      // gap below level
      repeat (3 + $urandom % 20) sample(18'($urandom % 32768), 32'($urandom));
      @(negedge clk) in_valid = 0;   // an idle cycle does not end a burst
      len = 1 + $urandom % 200;
      top = $urandom % len;
      e.v = 0; since = 0;
      for (int k = 0; k < len; k++) begin
        if (b % 3 == 0) m = 18'(32768 + 40000 - 40000 * (k > top ? k - top : top - k) / len);
        else            m = (k == 0) ? 18'(32768 + $urandom % 30000) : 18'(16384 + $urandom % 46000);
        if (k == len / 2 && b % 5 == 1) m = 18'd90000;   // plateau of equal maxima
        if (k == len / 2 + 1 && b % 5 == 1) m = 18'd90000;
        sample(m, 32'($urandom));
        if (k == 0 || m > e.v) begin e.v = m; e.d = divisor; e.r = dn_re; since = 0; end
        else since++;
      end
      sample(18'd100, 32'd0);     // first below-level sample ends the burst
      e.age = 10'(since + 1);
      q.push_back(e);
      due = cyc + 1;
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (reports != 40) begin failures++; $display("%0d reports", reports); end
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
