// tb_femto_prb_alloc: a reduced grid (10 PRBs of 3 subcarriers). Feeds
// random feedback codes and frame ticks and checks, against a reference
// model: the allocation taken at each frame tick (feedback 00 -> whole band,
// 01 -> high half, 10 -> low half, 11 -> quiet; whole band while in the
// forced mode), the alternation between adaptive and forced whole-band
// transmission every mode_period frames, and that each subcarrier of an
// unallocated PRB is sent as zero, with one cycle of latency.
module tb_femto_prb_alloc;
  import ifm_pkg::*;
  localparam int NP = 10, SC = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  feedback_t feedback = FB_NONE;
  logic fb_valid = 0, frame_tick = 0, sc_valid = 0, sc_first = 0;
  logic [15:0] mode_period = 16'd3;
  logic signed [15:0] sc_i = 0, sc_q = 0;
  logic out_valid, out_active, adaptive;
  logic signed [15:0] out_i, out_q;
  alloc_t alloc;
  logic [NP-1:0] prb_mask;
  femto_prb_alloc #(.NP(NP), .SC(SC)) dut (.*);

  feedback_t m_fb = FB_NONE;
  alloc_t m_alloc = ALLOC_WHOLE;
  bit m_adapt = 1;
  int m_cnt = 0, toggles = 0;
  int seen [4] = '{0, 0, 0, 0};

  function automatic alloc_t ref_alloc(feedback_t f);
    case (f)
      FB_NONE: return ALLOC_WHOLE;
      FB_LOW:  return ALLOC_HIGH;
      FB_HIGH: return ALLOC_LOW;
      default: return ALLOC_QUIET;
    endcase
  endfunction

  function automatic bit ref_active(alloc_t a, int p);
    case (a)
      ALLOC_WHOLE: return 1;
      ALLOC_LOW:   return p < NP / 2;
      ALLOC_HIGH:  return p >= NP / 2;
      default:     return 0;
    endcase
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 60; fr++) begin
      // a feedback code arrives at a random point of the frame
      @(negedge clk);
      fb_valid = 1;
      feedback = feedback_t'($urandom_range(0, 3));
      m_fb = feedback;
      @(negedge clk) fb_valid = 0;
      if (fr == 40) mode_period = 0;        // period 0: adaptive only
      // frame tick
      frame_tick = 1;
      if (mode_period == 0) begin
        m_cnt = 0;
        if (!m_adapt) toggles++;
        m_adapt = 1;
      end else if (m_cnt >= mode_period - 1) begin
        m_cnt = 0; m_adapt = !m_adapt; toggles++;
      end else m_cnt++;
      m_alloc = m_adapt ? ref_alloc(m_fb) : ALLOC_WHOLE;
      @(negedge clk) frame_tick = 0;
      checks += 2;
      if (alloc != m_alloc || adaptive != m_adapt) begin
        failures++; $display("frame %0d: alloc %s adaptive %b, expected %s %b",
                             fr, alloc.name(), adaptive, m_alloc.name(), m_adapt);
      end
      for (int p = 0; p < NP; p++)
        if (prb_mask[p] != ref_active(m_alloc, p)) begin
          failures++; $display("mask bit %0d", p); break;
        end
      seen[int'(alloc)]++;
      // one OFDM symbol of subcarriers, with random gaps
      for (int k = 0; k < NP * SC; k++) begin
        bit act;
        while ($urandom_range(0, 3) == 0) begin
          sc_valid = 0; @(negedge clk);
        end
        sc_valid = 1; sc_first = (k == 0);
        sc_i = 16'($urandom); sc_q = 16'($urandom);
        act = ref_active(m_alloc, k / SC);
        @(posedge clk); #1;
        checks += 2;
        if (!out_valid || out_active != act) begin
          failures++; $display("subcarrier %0d: active %b", k, out_active);
        end
        if (out_i != (act ? sc_i : 16'sd0) || out_q != (act ? sc_q : 16'sd0)) begin
          failures++; $display("subcarrier %0d: data %0d %0d", k, out_i, out_q);
        end
        @(negedge clk);
        sc_valid = 0; sc_first = 0;
      end
    end
    checks += 2;
    if (toggles < 10) begin failures++; $display("only %0d mode changes", toggles); end
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0 || seen[3] == 0) begin
      failures++; $display("an allocation never occurred");
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
