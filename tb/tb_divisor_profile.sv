// tb_divisor_profile: the maximum follows the largest valid divisor, the
// threshold is half of it, a gain change restarts the maximum from the
// current divisor, clear empties it, and peak_above compares a peak's
// divisor with the threshold.
module tb_divisor_profile;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear = 0, in_valid = 0, peak_above, gain_changed;
  logic [31:0] divisor = 0, peak_div = 0, max_div, threshold;
  logic [7:0] gain_value = 8'd10;
  divisor_profile dut (.*);

  logic [31:0] ref_max;

  task automatic step(logic v, logic [31:0] d, logic [7:0] g, logic c);
    logic [7:0] gprev;
    @(negedge clk);
    gprev = gain_value;
    in_valid = v; divisor = d; gain_value = g; clear = c;
    if (c) ref_max = 0;
    else if (g != gprev) ref_max = v ? d : 0;
    else if (v && d > ref_max) ref_max = d;
    @(posedge clk); #1;
    checks++;
    if (max_div !== ref_max || threshold !== (ref_max >> 1)) begin
      failures++; $display("max %0d thr %0d expected %0d", max_div, threshold, ref_max);
    end
    peak_div = 32'($urandom) >> ($urandom % 4);
    #1;
    checks++;
    if (peak_above !== (peak_div > (ref_max >> 1))) begin failures++; $display("peak_above wrong"); end
  endtask

  initial begin
    ref_max = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // first gain value differs from the reset copy: counts as a change
    for (int k = 0; k < 300; k++) begin
      logic [7:0] g;
      g = (k % 97 == 50) ? gain_value + 8'd3 : gain_value;
      step(($urandom % 5) != 0, 32'($urandom) >> ($urandom % 8), g, k == 200);
    end
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
