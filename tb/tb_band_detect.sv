// tb_band_detect: a metric stream with one triangular peak every SYM_LEN
// samples, of scripted heights. start is given a few samples after the
// first data peak (as the central control does after the peak report).
// Checks, per frame: one decision; n_peaks = frame_len; n_valid = number of
// the frame's peaks above the threshold; interf = (n_valid < frame_len);
// the decision arrives one symbol period per peak after start.
// Runs frames with no low peak, one low peak at the start, in the middle
// and at the end, and one where all peaks are low.
module tb_band_detect;
  localparam int SYM = 50, QW = 18;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, start = 0, decision_valid, interf;
  logic [QW-1:0] metric = 0, level = 18'd30000, threshold = 18'd60000;
  logic [7:0] frame_len = 0, n_peaks, n_valid;
  logic [1:0] state;
  band_detect #(.QW(QW), .SYM_LEN(SYM), .SW(8)) dut (.*);

  int decisions = 0, t_start = 0, t_dec = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && decision_valid) begin decisions++; t_dec = cyc; end

  // one symbol: triangular peak of height h centred at sample 25
  task automatic symbol(int h, bit st_after_peak = 0);
    for (int k = 0; k < SYM; k++) begin
      int d;
      @(negedge clk);
      d = (k > 25) ? k - 25 : 25 - k;
      in_valid = 1;
      metric = (d < 15) ? QW'(h - h * d / 15) : QW'(100);
      start = st_after_peak && (k == 33);
      frame_len = st_after_peak ? 8'(nsyms) : 8'(0);
    end
    @(negedge clk) start = 0;
    in_valid = 0;
  endtask

  int nsyms;
  task automatic frame(int heights [$]);
    int nv;
    int d0;
    nsyms = heights.size();
    nv = 0;
    foreach (heights[i]) if (heights[i] > 60000) nv++;
    d0 = decisions;
    symbol(64000);                   // a silence-period peak before the frame
    symbol(heights[0], 1);
    t_start = cyc;
    for (int i = 1; i < heights.size(); i++) symbol(heights[i]);
    repeat (2) symbol(20000);
    checks += 3;
    if (decisions != d0 + 1) begin failures++; $display("%0d decisions", decisions - d0); end
    if (n_peaks != 8'(nsyms) || n_valid != 8'(nv)) begin
      failures++; $display("peaks %0d valid %0d, expected %0d %0d", n_peaks, n_valid, nsyms, nv);
    end
    if (interf != (nv < nsyms)) begin failures++; $display("interf %b", interf); end
    checks++;
    // start seen at sample 33 of the first symbol; decision after nsyms-1
    // symbol periods plus the one-cycle I1 and I3 steps (+ idle cycles
    // between symbols of this stimulus)
    if (t_dec - t_start > (nsyms) * (SYM + 1) + 5 || t_dec < t_start) begin
      failures++; $display("decision timing %0d", t_dec - t_start);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    frame('{65000, 65000, 65000, 65000, 65000});
    frame('{50000, 65000, 65000, 65000});
    frame('{65000, 65000, 59000, 65000, 65000, 65000});
    frame('{65000, 65000, 65000, 40000});
    frame('{35000, 40000, 45000});
    // a frame whose first data peak never reached the level: the previous
    // (silence) run is older than half a symbol and must be forgotten
    frame('{20000, 65000, 65000});
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
