// tb_cplx_halfband_filter: checks the time-shared complex filter.
//  - bit exactness: every output equals the combination of the four real
//    convolutions s_i*h_i, s_q*h_i, s_i*h_q, s_q*h_q (each rounded and
//    saturated to 18 bits), as low = (ii - qq, qi + iq) and
//    high = (ii + qq, qi - iq), saturated to 16 bits;
//  - a fixed latency, measured in baseband clock cycles;
//  - band separation: a -5 MHz tone leaves mostly through the low output
//    and a +5 MHz tone through the high one (power ratio above 30 dB).
// clk2x runs at exactly twice clk with aligned edges.
module tb_cplx_halfband_filter;
  import fir_coef_pkg::*;
  localparam int DW = 16;
  logic clk = 0, clk2x = 0, rst_n = 0;
  always #5 clk2x = ~clk2x;
  always @(posedge clk2x) clk <= ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  logic signed [DW-1:0] in_i = 0, in_q = 0;
  logic out_valid;
  logic signed [DW-1:0] low_i, low_q, high_i, high_q;

  cplx_halfband_filter #(.DW(DW)) dut (.*);

  longint xi [$], xq [$];
  int in_cyc [$];
  int cyc = 0, nout = 0, lat = -1;
  real p_lo, p_hi;
  bit tone_phase;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint conv(bit use_q_in, bit use_hq, int n);
    longint s;
    s = 0;
    for (int k = 0; k < int'(NTAPS); k++)
      if (n - k >= 0) s += longint'(use_hq ? H_Q[k] : H_I[k]) * (use_q_in ? xq[n-k] : xi[n-k]);
    s = (s + (64'sd1 <<< 16)) >>> 17;
    if (s > 131071) s = 131071;
    if (s < -131072) s = -131072;
    return s;
  endfunction
  function automatic longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    longint ii, qi, iq, qq;
    ii = conv(0, 0, nout); qi = conv(1, 0, nout); iq = conv(0, 1, nout); qq = conv(1, 1, nout);
    checks++;
    if (longint'(low_i) != sat16(ii - qq) || longint'(low_q) != sat16(qi + iq) ||
        longint'(high_i) != sat16(ii + qq) || longint'(high_q) != sat16(qi - iq)) begin
      failures++;
      if (failures < 10) $display("out %0d mismatch: low=(%0d,%0d) exp (%0d,%0d)", nout, low_i, low_q, sat16(ii-qq), sat16(qi+iq));
    end
    checks++;
    if (lat < 0) begin
      lat = cyc - in_cyc[nout];
      $display("latency %0d baseband cycles", lat);
    end else if (cyc - in_cyc[nout] != lat) begin
      failures++; $display("latency changed to %0d", cyc - in_cyc[nout]);
    end
    if (tone_phase && nout > 200) begin
      p_lo += real'(low_i)*real'(low_i) + real'(low_q)*real'(low_q);
      p_hi += real'(high_i)*real'(high_i) + real'(high_q)*real'(high_q);
    end
    nout++;
  end

  task automatic drive(int n, int mode);
    // mode 0: random, 1: -5 MHz tone, 2: +5 MHz tone
    for (int t = 0; t < n; t++) begin
      real ph;
      @(negedge clk);
      in_valid = 1;
      ph = 2.0 * 3.14159265358979 * 5.0 / 30.72 * real'(xi.size());
      case (mode)
        1: begin in_i = DW'(int'(12000.0 * $cos(ph))); in_q = DW'(int'(-12000.0 * $sin(ph))); end
        2: begin in_i = DW'(int'(12000.0 * $cos(ph))); in_q = DW'(int'(12000.0 * $sin(ph))); end
        default: begin in_i = DW'($urandom); in_q = DW'($urandom); end
      endcase
      xi.push_back(longint'(in_i)); xq.push_back(longint'(in_q));
      in_cyc.push_back(cyc);
    end
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    drive(400, 0);
    // tones: restart the power counters when the tone reaches the output
    tone_phase = 0;
    drive(50, 1);
    p_lo = 0; p_hi = 0; tone_phase = 1;
    drive(400, 1);
    repeat (20) @(posedge clk);
    tone_phase = 0;
    checks++;
    if (!(p_lo > 1000.0 * p_hi && p_lo > 0)) begin
      failures++; $display("-5 MHz tone: low %e high %e", p_lo, p_hi);
    end
    tone_phase = 0;
    drive(50, 2);
    p_lo = 0; p_hi = 0; tone_phase = 1;
    drive(400, 2);
    @(negedge clk) in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (!(p_hi > 1000.0 * p_lo && p_hi > 0)) begin
      failures++; $display("+5 MHz tone: low %e high %e", p_lo, p_hi);
    end
    checks++;
    if (nout != xi.size()) begin failures++; $display("%0d outputs for %0d inputs", nout, xi.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
