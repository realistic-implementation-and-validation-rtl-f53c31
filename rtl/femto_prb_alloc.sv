// femto_prb_alloc: dynamic PRB allocation of the femto BS.
//
// The femto BS may use the whole 20 MHz (100 PRBs), only the low 10 MHz
// (PRBs 0-49), only the high 10 MHz (PRBs 50-99) or stay quiet. In the
// adaptive transmission mode the scheme follows the macro UE's feedback:
// no interference -> whole band; interference seen in the low half ->
// high half; in the high half -> low half; whole band -> quiet. In the
// forced mode the feedback is ignored and the whole band is used. For
// experiments the two modes alternate every mode_period 5 ms frames
// (0 keeps the adaptive mode).
//
// The latest feedback is held when it arrives; the scheme and the mode
// change only at frame_tick, the start of a femto frame. The subcarrier
// stream (sc_first marks subcarrier 0 of an OFDM symbol; subcarriers run
// from the lowest frequency up, 12 per PRB) is passed through with the
// subcarriers of inactive PRBs set to zero; out_active tells which.
// Timing: registered, one cycle.
//
// The four schemes, the feedback meaning, the two transmission modes and
// the programmable period are the document's; the PRB numbering, the
// update at frame boundaries and the feedback held between frames are this
// design's choices.
module femto_prb_alloc
  import ifm_pkg::*;
#(
  parameter int unsigned DW = 16,
  parameter int unsigned NP = N_PRB,
  parameter int unsigned SC = SC_PER_PRB
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  feedback_t            feedback,
  input  logic                 fb_valid,
  input  logic                 frame_tick,
  input  logic [15:0]          mode_period,
  input  logic                 sc_valid,
  input  logic                 sc_first,
  input  logic signed [DW-1:0] sc_i,
  input  logic signed [DW-1:0] sc_q,
  output logic                 out_valid,
  output logic                 out_active,
  output logic signed [DW-1:0] out_i,
  output logic signed [DW-1:0] out_q,
  output alloc_t               alloc,
  output logic                 adaptive,
  output logic [NP-1:0]        prb_mask
);
  feedback_t fb_q;
  logic [15:0] fcnt;
  logic [$clog2(NP)-1:0] prb;
  logic [$clog2(SC)-1:0] sc;

  always_comb begin
    for (int p = 0; p < int'(NP); p++) begin
      case (alloc)
        ALLOC_WHOLE: prb_mask[p] = 1'b1;
        ALLOC_LOW:   prb_mask[p] = (p <  int'(NP) / 2);
        ALLOC_HIGH:  prb_mask[p] = (p >= int'(NP) / 2);
        default:     prb_mask[p] = 1'b0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fb_q <= FB_NONE;
      fcnt <= '0;
      alloc <= ALLOC_WHOLE;
      adaptive <= 1'b1;
    end else begin
      if (fb_valid) fb_q <= feedback;
      if (frame_tick) begin
        logic nxt_adaptive;
        nxt_adaptive = adaptive;
        if (mode_period == '0) begin
          nxt_adaptive = 1'b1;
          fcnt <= '0;
        end else if (fcnt >= mode_period - 1'b1) begin
          nxt_adaptive = !adaptive;
          fcnt <= '0;
        end else begin
          fcnt <= fcnt + 1'b1;
        end
        adaptive <= nxt_adaptive;
        alloc <= nxt_adaptive ? alloc_from_feedback(fb_valid ? feedback : fb_q) : ALLOC_WHOLE;
      end
    end
  end

  // subcarrier masking
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prb <= '0; sc <= '0;
      out_valid <= 1'b0; out_active <= 1'b0; out_i <= '0; out_q <= '0;
    end else begin
      out_valid <= sc_valid;
      if (sc_valid) begin
        logic [$clog2(NP)-1:0] p;
        logic [$clog2(SC)-1:0] c;
        p = sc_first ? '0 : prb;
        c = sc_first ? '0 : sc;
        out_active <= prb_mask[p];
        out_i <= prb_mask[p] ? sc_i : '0;
        out_q <= prb_mask[p] ? sc_q : '0;
        if (c == ($clog2(SC))'(SC - 1)) begin
          sc  <= '0;
          prb <= (p == ($clog2(NP))'(NP - 1)) ? '0 : p + 1'b1;
        end else begin
          sc  <= c + 1'b1;
          prb <= p;
        end
      end
    end
  end
endmodule
