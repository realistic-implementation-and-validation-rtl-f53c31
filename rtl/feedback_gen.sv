// feedback_gen: femto-BS allocation feedback from the three interference
// decisions of a 5 ms frame.
//
// The decision table: no whole-band detection means no interference (00);
// otherwise interference only in the low half gives 01, only in the high
// half gives 10, and any other combination (both halves or neither)
// means interference over the whole band (11).
//
// Each branch's decision is held when its decision_valid arrives; once all
// three have arrived the two-bit feedback is registered and fb_valid pulses
// for one cycle, and the collection starts again.
//
// The table is the document's; the collection of the three decisions is
// this design's choice.
module feedback_gen
  import ifm_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      wb_valid,
  input  logic      wb_interf,
  input  logic      lo_valid,
  input  logic      lo_interf,
  input  logic      hi_valid,
  input  logic      hi_interf,
  output feedback_t feedback,
  output logic      fb_valid
);
  logic got_wb, got_lo, got_hi;
  logic d_wb, d_lo, d_hi;
  logic n_got_wb, n_got_lo, n_got_hi, n_wb, n_lo, n_hi;

  function automatic feedback_t decide(logic wb, logic lo, logic hi);
    if (!wb)             return FB_NONE;
    else if (lo && !hi)  return FB_LOW;
    else if (!lo && hi)  return FB_HIGH;
    else                 return FB_WHOLE;
  endfunction

  always_comb begin
    n_got_wb = got_wb || wb_valid;  n_wb = wb_valid ? wb_interf : d_wb;
    n_got_lo = got_lo || lo_valid;  n_lo = lo_valid ? lo_interf : d_lo;
    n_got_hi = got_hi || hi_valid;  n_hi = hi_valid ? hi_interf : d_hi;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got_wb <= 1'b0; got_lo <= 1'b0; got_hi <= 1'b0;
      d_wb <= 1'b0; d_lo <= 1'b0; d_hi <= 1'b0;
      feedback <= FB_NONE;
      fb_valid <= 1'b0;
    end else begin
      fb_valid <= 1'b0;
      d_wb <= n_wb; d_lo <= n_lo; d_hi <= n_hi;
      if (n_got_wb && n_got_lo && n_got_hi) begin
        feedback <= decide(n_wb, n_lo, n_hi);
        fb_valid <= 1'b1;
        got_wb <= 1'b0; got_lo <= 1'b0; got_hi <= 1'b0;
      end else begin
        got_wb <= n_got_wb; got_lo <= n_got_lo; got_hi <= n_got_hi;
      end
    end
  end
endmodule
