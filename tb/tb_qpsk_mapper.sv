// tb_qpsk_mapper: all four bit pairs with random valid gaps; checks the
// Gray mapping (bit 1 -> negative, bits[1] on I, bits[0] on Q), the
// amplitude, the one-cycle latency and that the output holds when idle.
module tb_qpsk_mapper;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid;
  logic [1:0] bits = 0;
  logic signed [15:0] out_i, out_q;
  qpsk_mapper dut (.*);

  initial begin
    logic signed [15:0] ei, eq;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ei = 0; eq = 0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      in_valid = 1'($urandom);
      bits = 2'($urandom);
      if (in_valid) begin
        ei = bits[1] ? -16'sd11585 : 16'sd11585;
        eq = bits[0] ? -16'sd11585 : 16'sd11585;
      end
      @(posedge clk); #1;
      checks += 2;
      if (out_valid != in_valid) begin failures++; $display("valid %b", out_valid); end
      if (out_i != ei || out_q != eq) begin
        failures++; $display("bits %b -> %0d %0d", bits, out_i, out_q);
      end
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
