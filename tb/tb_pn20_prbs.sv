// tb_pn20_prbs: compares the generator with a bit-serial reference of the
// recurrence b[n] = b[n-20] xor b[n-3] (polynomial x^20 + x^3 + 1), for two
// bits per step, random enable gaps and reloads. Also checks that the
// sequence period is 2^20 - 1 steps of one bit, on a one-bit instance, and
// that a zero seed is replaced by all ones.
module tb_pn20_prbs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load = 0, en = 0, valid, valid1;
  logic [19:0] seed = 0;
  logic [1:0] bits;
  logic [0:0] bits1;
  pn20_prbs #(.B(2)) dut (.clk, .rst_n, .load, .seed, .en, .valid, .bits);
  logic en1 = 0;
  pn20_prbs #(.B(1)) dut1 (.clk, .rst_n, .load(1'b0), .seed(20'd0), .en(en1), .valid(valid1), .bits(bits1));

  logic [19:0] ref_sr;
  function automatic bit ref_step();
    bit nb;
    nb = ref_sr[19] ^ ref_sr[2];
    ref_sr = {ref_sr[18:0], nb};
    return nb;
  endfunction

  initial begin
    logic [19:0] first;
    int period;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ref_sr = 20'hFFFFF;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      load = 0; en = 0;
      if ($urandom_range(0, 499) == 0) begin
        load = 1;
        seed = ($urandom_range(0, 3) == 0) ? 20'd0 : 20'($urandom);
        ref_sr = (seed == 0) ? 20'hFFFFF : seed;
      end else if ($urandom_range(0, 3) != 0) begin
        bit b1, b0;
        en = 1;
        b1 = ref_step();
        b0 = ref_step();
        @(posedge clk); #1;
        checks++;
        if (!valid || bits != {b1, b0}) begin
          failures++; $display("step %0d: %b, expected %b", t, bits, {b1, b0});
        end
        continue;
      end
      @(posedge clk); #1;
      checks++;
      if (valid) begin failures++; $display("valid without enable"); end
    end
    @(negedge clk) en = 0; load = 0;
    // period of the one-bit instance: the state returns after 2^20-1 steps
    first = dut1.sr;
    en1 = 1;
    period = 0;
    do begin
      @(posedge clk); #1;
      period++;
    end while (dut1.sr != first && period < 1100000);
    en1 = 0;
    checks++;
    if (period != 1048575) begin failures++; $display("period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
