// tb_pipe_div: checks the pipelined divider against a wide-integer
// reference: q = min(floor(num * 2^16 / den), 2^18 - 1), 0/0 = 0, with one
// operation per cycle and a fixed latency of 19 cycles.
module tb_pipe_div;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic        in_valid = 0;
  logic [63:0] num = 0, den = 0;
  logic [15:0] in_tag = 0;
  logic        out_valid;
  logic [17:0] q;
  logic [15:0] out_tag;

  pipe_div #(.NW(64), .DW(64), .QF(16), .QI(2), .TW(16)) dut (
    .clk, .rst_n, .in_valid, .num, .den, .in_tag, .out_valid, .q, .out_tag
  );

  logic [17:0] exp_q [int];
  int issue_cyc [int];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [17:0] ref_div(logic [63:0] n, logic [63:0] d);
    logic [127:0] t;
    if (n == 0) return 0;
    if (d == 0) return '1;
    t = ({64'd0, n} << 16) / {64'd0, d};
    if (t > 128'h3FFFF) return '1;
    return t[17:0];
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (!exp_q.exists(int'(out_tag))) begin
        failures++; $display("unexpected tag %0d", out_tag);
      end else begin
        if (q !== exp_q[int'(out_tag)]) begin
          failures++;
          $display("tag %0d: q=%h expected %h", out_tag, q, exp_q[int'(out_tag)]);
        end
        checks++;
        if (cyc - issue_cyc[int'(out_tag)] != 19) begin
          failures++;
          $display("tag %0d: latency %0d", out_tag, cyc - issue_cyc[int'(out_tag)]);
        end
        exp_q.delete(int'(out_tag));
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      logic [63:0] n, d;
      @(negedge clk);
      case (k % 5)
        0: begin d = {$urandom, $urandom} >> 2; n = d - (d >> ($urandom % 8)); end  // ratio near 1
        1: begin d = {$urandom, $urandom} >> 3; n = d >> ($urandom % 20); end
        2: begin d = 64'($urandom); n = d << 3; end   // saturates
        3: begin d = (k % 10 == 3) ? 64'd0 : 64'd7; n = (k % 20 == 3) ? 64'd0 : 64'd5; end
        default: begin d = {$urandom, $urandom} >> 2; n = {$urandom, $urandom} >> 3; end
      endcase
      in_valid = (k % 7 != 6);
      num = n; den = d; in_tag = 16'(k);
      if (in_valid) begin
        exp_q[k] = ref_div(n, d);
        issue_cyc[k] = cyc;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (exp_q.num() != 0) begin
      failures++; $display("%0d results missing", exp_q.num());
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
