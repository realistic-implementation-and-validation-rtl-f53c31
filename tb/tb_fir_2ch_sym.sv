// tb_fir_2ch_sym: checks both shared filters (even-symmetric h_i and
// odd-symmetric h_q) on two interleaved random channels against a direct
// convolution per channel, y_c[n] = sat18(floor((sum_k h[k] x_c[n-k] +
// 2^16) / 2^17)), the channel tags, and the 4-cycle latency.
module tb_fir_2ch_sym;
  import fir_coef_pkg::*;
  localparam int DW = 16, OW = 18;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ch = 0;
  logic signed [DW-1:0] in_data = 0;
  logic v_i, c_i, v_q, c_q;
  logic signed [OW-1:0] y_i, y_q;

  fir_2ch_sym #(.DW(DW), .OW(OW), .ODD_SYM(1'b0), .COEFS(H_I)) dut_i (
    .clk, .rst_n, .in_valid, .in_ch, .in_data, .out_valid(v_i), .out_ch(c_i), .out_data(y_i));
  fir_2ch_sym #(.DW(DW), .OW(OW), .ODD_SYM(1'b1), .COEFS(H_Q)) dut_q (
    .clk, .rst_n, .in_valid, .in_ch, .in_data, .out_valid(v_q), .out_ch(c_q), .out_data(y_q));

  longint hist [2][$];
  typedef struct { longint yi, yq; logic ch; int c; } exp_t;
  exp_t q [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint conv(int ch, bit use_q);
    longint s;
    int n;
    s = 0;
    n = hist[ch].size();
    for (int k = 0; k < int'(NTAPS); k++)
      if (n - 1 - k >= 0) s += longint'(use_q ? H_Q[k] : H_I[k]) * hist[ch][n-1-k];
    s = (s + (64'sd1 <<< 16)) >>> 17;
    if (s > 131071) s = 131071;
    if (s < -131072) s = -131072;
    return s;
  endfunction

  always @(posedge clk) if (rst_n && v_i) begin
    exp_t e;
    if (q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = q.pop_front();
      checks += 3;
      if (longint'(y_i) != e.yi || longint'(y_q) != e.yq) begin
        failures++; if (failures < 10) $display("cyc %0d: y=(%0d,%0d) expected (%0d,%0d)", cyc, y_i, y_q, e.yi, e.yq);
      end
      if (c_i != e.ch || c_q != e.ch || !v_q) begin failures++; $display("channel/valid mismatch"); end
      if (cyc - e.c != 4) begin failures++; if (failures < 10) $display("latency %0d", cyc - e.c); end
    end
  end

  initial begin
    logic ch;
    exp_t e;
    ch = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      in_valid = (t % 13 != 5);
      in_ch = ch;
      in_data = DW'($urandom);
      if (t > 300 && t < 330) in_data = ch ? -16'sh8000 : 16'sh7fff;  // full scale
      if (in_valid) begin
        hist[ch].push_back(longint'(in_data));
        e.yi = conv(ch, 0); e.yq = conv(ch, 1); e.ch = ch; e.c = cyc;
        q.push_back(e);
        ch = !ch;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
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
