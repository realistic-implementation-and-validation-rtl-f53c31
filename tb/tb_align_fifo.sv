// tb_align_fifo: the output is the input delayed by DEPTH valid samples
// (zero before that), one clock after the input, for a stream with gaps;
// with the default DEPTH the delay measured from an input sample to the same
// sample on the output is 8 clock cycles, matching the complex filter.
module tb_align_fifo;
  localparam int DW = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid;
  logic signed [DW-1:0] in_i = 0, in_q = 0, out_i, out_q;
  align_fifo #(.DW(DW)) dut (.*);

  logic [31:0] hist [$];
  int hcyc [$];
  int cyc = 0, nout = 0, lat = -1;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [31:0] e;
    e = (nout >= 7) ? hist[nout - 7] : 32'd0;
    checks++;
    if ({out_i, out_q} !== e) begin failures++; if (failures < 10) $display("out %0d: %h expected %h", nout, {out_i, out_q}, e); end
    if (nout >= 7 && in_valid === 1'b1) begin
      // continuous part: delay from input to output of the same sample
      if (lat < 0 && nout > 20) lat = cyc - hcyc[nout - 7];
    end
    nout++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      in_valid = (t < 100) ? 1'b1 : ($urandom % 4 != 0);
      in_i = DW'($urandom); in_q = DW'($urandom);
      if (in_valid) begin hist.push_back({in_i, in_q}); hcyc.push_back(cyc); end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (nout != hist.size()) begin failures++; $display("%0d outputs for %0d inputs", nout, hist.size()); end
    checks++;
    if (lat != 8) begin failures++; $display("delay %0d cycles, expected 8", lat); end
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
