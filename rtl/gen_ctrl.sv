// gen_ctrl: centralized control unit of the macro-UE receiver front end.
//
// A five-state machine that turns the stream of correlation peaks into
// frame timing:
//   S0_PROFILE  for PROFILE_SYMS OFDM symbols (PROFILE_SYMS*SYM_LEN
//               samples) only the divisor profile is built up;
//   S1_SILENCE  waits for a peak whose divisor is below the threshold,
//               i.e. a symbol of a quasi-quiet period;
//   S2_FIRST    waits for the first peak with an above-threshold divisor,
//               the first data symbol of a 5 ms frame. Coming from S1 the
//               frame format is not yet known and S3 follows; coming from
//               S3 or S4 the frame is forwarded (S4);
//   S3_COUNT    counts the data symbols (above-threshold peaks) until the
//               next below-threshold peak, which fixes frame_len, the
//               number of data symbols of a 5 ms frame, and returns to S2;
//   S4_FORWARD  the frame is being forwarded; on entry it starts the data
//               forwarding and the three interference detectors and
//               restarts the correlation sums; when the forwarding reports
//               the whole frame done it returns to S2.
// The whole-band decision returned by the whole-band detector is recorded
// (wb_interf) whenever it arrives.
//
// Mealy outputs: fwd_start, det_start and corr_restart are combinational
// pulses in the cycle of the peak report that enters S4, so that the peak
// age presented with them is exact.
//
// States and transitions are those of the document's state diagram. The
// silence/data decision by the divisor, the return to S2 when a frame has
// been forwarded, and the counter widths are as drawn; the AGC and FFT/CP
// control processes, left out of that diagram, are not part of this block.
module gen_ctrl #(
  parameter int unsigned SYM_LEN      = 2560,
  parameter int unsigned PROFILE_SYMS = 20,
  parameter int unsigned SW           = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,        // one per baseband sample
  input  logic          peak_valid,
  input  logic          peak_above,      // divisor at the peak above threshold
  input  logic          frame_done,      // from data forwarding
  input  logic          wb_valid,        // whole-band decision
  input  logic          wb_interf,
  output logic [2:0]    state,
  output logic [SW-1:0] frame_len,
  output logic          frame_known,
  output logic          fwd_start,
  output logic          det_start,
  output logic          corr_restart,
  output logic          wb_interf_q,
  output logic [15:0]   frames_fwd       // frames forwarded so far
);
  typedef enum logic [2:0] {
    S0_PROFILE = 3'd0,
    S1_SILENCE = 3'd1,
    S2_FIRST   = 3'd2,
    S3_COUNT   = 3'd3,
    S4_FORWARD = 3'd4
  } cstate_t;

  localparam int unsigned PROFILE_LEN = PROFILE_SYMS * SYM_LEN;
  localparam int unsigned PW = $clog2(PROFILE_LEN + 1);

  cstate_t st;
  logic    from_s1;              // S2 was entered from S1
  logic [PW-1:0] pcnt;
  logic [SW-1:0] scount;

  assign state = st;

  logic enter_s4;
  assign enter_s4 = (st == S2_FIRST) && peak_valid && peak_above && !from_s1;
  assign fwd_start    = enter_s4;
  assign det_start    = enter_s4;
  assign corr_restart = enter_s4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S0_PROFILE;
      from_s1 <= 1'b0;
      pcnt <= '0;
      scount <= '0;
      frame_len <= '0;
      frame_known <= 1'b0;
      wb_interf_q <= 1'b0;
      frames_fwd <= '0;
    end else begin
      if (wb_valid) wb_interf_q <= wb_interf;
      case (st)
        S0_PROFILE: if (in_valid) begin
          if (pcnt == PW'(PROFILE_LEN - 1)) st <= S1_SILENCE;
          else pcnt <= pcnt + 1'b1;
        end
        S1_SILENCE: if (peak_valid && !peak_above) begin
          st <= S2_FIRST;
          from_s1 <= 1'b1;
        end
        S2_FIRST: if (peak_valid && peak_above) begin
          if (from_s1) begin
            st <= S3_COUNT;
            scount <= SW'(1);
          end else begin
            st <= S4_FORWARD;
          end
        end
        S3_COUNT: if (peak_valid) begin
          if (peak_above) begin
            if (scount != '1) scount <= scount + 1'b1;
          end else begin
            frame_len   <= scount;
            frame_known <= 1'b1;
            from_s1 <= 1'b0;
            st <= S2_FIRST;
          end
        end
        S4_FORWARD: if (frame_done) begin
          frames_fwd <= frames_fwd + 1'b1;
          from_s1 <= 1'b0;
          st <= S2_FIRST;
        end
        default: st <= S0_PROFILE;
      endcase
    end
  end
endmodule
