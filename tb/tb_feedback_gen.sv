// tb_feedback_gen: delivers the three band decisions (whole band, low half,
// high half) in random order and at random times, and checks that exactly
// one feedback pulse follows, one cycle after the last of the three, with
// the code of the decision rule: no whole-band interference -> 00; only the
// low half -> 01; only the high half -> 10; otherwise -> 11.
module tb_feedback_gen;
  import ifm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wb_valid = 0, wb_interf = 0, lo_valid = 0, lo_interf = 0, hi_valid = 0, hi_interf = 0;
  feedback_t feedback;
  logic fb_valid;
  feedback_gen dut (.*);

  int pulses = 0;
  always @(negedge clk) if (rst_n && fb_valid) pulses++;

  function automatic feedback_t expect_fb(bit wb, bit lo, bit hi);
    if (!wb) return FB_NONE;
    if (lo && !hi) return FB_LOW;
    if (hi && !lo) return FB_HIGH;
    return FB_WHOLE;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      bit wb, lo, hi;
      int order;
      int p0;
      bit [2:0] sent;
      wb = 1'($urandom); lo = 1'($urandom); hi = 1'($urandom);
      p0 = pulses;
      sent = 0;
      // deliver in random order; sometimes two in the same cycle
      while (sent != 3'b111) begin
        @(negedge clk);
        wb_valid = 0; lo_valid = 0; hi_valid = 0;
        for (int k = 0; k < 3; k++) begin
          order = $urandom_range(0, 2);
          if (!sent[order] && ($urandom_range(0, 2) == 0)) begin
            sent[order] = 1;
            case (order)
              0: begin wb_valid = 1; wb_interf = wb; end
              1: begin lo_valid = 1; lo_interf = lo; end
              default: begin hi_valid = 1; hi_interf = hi; end
            endcase
          end
        end
        if (sent != 3'b111) begin
          @(posedge clk); #1;
          checks++;
          if (fb_valid) begin failures++; $display("early pulse"); end
        end
      end
      @(posedge clk); #1;
      wb_valid = 0; lo_valid = 0; hi_valid = 0;
      wb_interf = 1'($urandom); lo_interf = 1'($urandom); hi_interf = 1'($urandom);
      checks += 2;
      if (!fb_valid) begin failures++; $display("no pulse, test %0d", t); end
      if (feedback != expect_fb(wb, lo, hi)) begin
        failures++; $display("wb%b lo%b hi%b -> %b", wb, lo, hi, feedback);
      end
      repeat ($urandom_range(1, 4)) @(posedge clk);
      checks++;
      if (pulses != p0 + 1) begin failures++; $display("%0d pulses", pulses - p0); end
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
