// band_detect: interference-detection state machine of one correlation
// branch (whole band, low 10 MHz or high 10 MHz).
//
// Interference lowers the CP-correlation peaks, so a frame is declared
// interfered when not every one of its frame_len data-symbol peaks reaches
// the branch threshold:
//   I0_INIT  counters cleared; waits for start from the central control;
//   I1_PEAK  number_of_peaks += 1, and number_of_valid_peaks += 1 if the
//            current peak value exceeds the threshold; then I2 while
//            fewer than frame_len peaks were taken, else I3;
//   I2_WAIT  waits one OFDM symbol (SYM_LEN-1 samples, so that peaks are
//            taken every SYM_LEN samples) while collecting the largest
//            metric value of that period, which is the next peak value;
//   I3_DECIDE interf = (valid peaks < frame_len); decision_valid pulses and
//            the machine returns to I0.
// Peak values: during I2 the maximum of the metric since the last peak was
// taken; for the first peak (taken at start) the maximum of the most recent
// run of metric values (starting at the level, ending below half of it),
// forgotten when that run ended more than half a symbol ago.
//
// The states and the counting rule are the document's; how the peak value
// of each symbol is collected is this design's choice (it lets the same
// block serve the two half-band branches, which have no timing of their
// own).
module band_detect #(
  parameter int unsigned QW      = 18,
  parameter int unsigned SYM_LEN = 2560,
  parameter int unsigned SW      = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [QW-1:0] metric,
  input  logic [QW-1:0] level,       // peak detection level
  input  logic [QW-1:0] threshold,   // interference-detection threshold
  input  logic          start,
  input  logic [SW-1:0] frame_len,
  output logic [1:0]    state,
  output logic          decision_valid,
  output logic          interf,
  output logic [SW-1:0] n_peaks,
  output logic [SW-1:0] n_valid
);
  typedef enum logic [1:0] {I0_INIT, I1_PEAK, I2_WAIT, I3_DECIDE} dstate_t;
  localparam int unsigned CW = $clog2(SYM_LEN + 1);

  dstate_t st;
  logic [QW-1:0] pk;
  logic          run;        // inside a run at or above level (I0 only)
  logic [CW-1:0] cnt;        // I2 wait counter / I0 time since run end
  logic [SW-1:0] len_q;

  assign state = st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= I0_INIT;
      pk <= '0; run <= 1'b0; cnt <= '0; len_q <= '0;
      n_peaks <= '0; n_valid <= '0;
      decision_valid <= 1'b0; interf <= 1'b0;
    end else begin
      decision_valid <= 1'b0;
      case (st)
        I0_INIT: begin
          if (in_valid) begin
            if (metric >= level || (run && metric >= (level >> 1))) begin
              // a run starts at the level and ends below half of it, the
              // same hysteresis as the peak detector
              if (!run || metric > pk) pk <= metric;
              run <= 1'b1;
              cnt <= '0;
            end else begin
              run <= 1'b0;
              if (cnt == CW'(SYM_LEN / 2)) pk <= '0;
              else cnt <= cnt + 1'b1;
            end
          end
          if (start) begin
            n_peaks <= '0;
            n_valid <= '0;
            len_q   <= frame_len;
            st      <= I1_PEAK;
          end
        end
        I1_PEAK: begin
          n_peaks <= n_peaks + 1'b1;
          if (pk > threshold) n_valid <= n_valid + 1'b1;
          pk  <= (in_valid) ? metric : '0;
          cnt <= CW'(SYM_LEN - 1);
          st  <= (n_peaks + 1'b1 < len_q) ? I2_WAIT : I3_DECIDE;
        end
        I2_WAIT: if (in_valid) begin
          if (metric > pk) pk <= metric;
          if (cnt == CW'(1)) st <= I1_PEAK;
          cnt <= cnt - 1'b1;
        end
        I3_DECIDE: begin
          interf         <= (n_valid < len_q);
          decision_valid <= 1'b1;
          run <= 1'b0;
          pk  <= '0;
          cnt <= '0;
          st  <= I0_INIT;
        end
        default: st <= I0_INIT;
      endcase
    end
  end
endmodule
