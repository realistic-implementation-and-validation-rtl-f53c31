// peak_detect: finds the peak of each burst of the normalised correlation.
//
// A burst starts at the first valid sample whose metric is at or above the
// detection level and ends at the first one below half the level; the
// hysteresis keeps a noisy rising edge, which may cross the level several
// times, from being split into several bursts. Inside a burst the block keeps the largest metric
// seen, the divisor and correlation value that came with it, and the number
// of samples that have passed since it. When the burst ends one peak is reported (peak_valid pulse) with
//   peak_value   the maximum metric of the burst,
//   peak_age     samples from the maximum to the report (10 bits, saturating),
//   peak_div     the divisor value at the maximum,
//   peak_dn_*    the scaled correlation dn at the maximum (for the CFO).
// A burst still open when the age counter saturates is reported at once.
//
// Timing: peak_valid is registered, one cycle after the sample that
// ends the burst. The level is a run-time input (Q2.16, same format as the metric).
//
// The document names a threshold-based peak detection with a 10-bit peak
// index; the burst rule with its hysteresis and the meaning of the index (age of the maximum)
// are this design's choices.
module peak_detect #(
  parameter int unsigned QW = 18,
  parameter int unsigned IW = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [QW-1:0]        metric,
  input  logic [31:0]          divisor,
  input  logic signed [31:0]   dn_re,
  input  logic signed [31:0]   dn_im,
  input  logic [QW-1:0]        level,
  output logic                 peak_valid,
  output logic [QW-1:0]        peak_value,
  output logic [IW-1:0]        peak_age,
  output logic [31:0]          peak_div,
  output logic signed [31:0]   peak_dn_re,
  output logic signed [31:0]   peak_dn_im
);
  logic          active;
  logic [QW-1:0] mx;
  logic [IW-1:0] age;
  logic [31:0]   mdiv;
  logic signed [31:0] mre, mim;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      mx <= '0; age <= '0; mdiv <= '0; mre <= '0; mim <= '0;
      peak_valid <= 1'b0;
      peak_value <= '0; peak_age <= '0; peak_div <= '0;
      peak_dn_re <= '0; peak_dn_im <= '0;
    end else begin
      peak_valid <= 1'b0;
      if (in_valid) begin
        if (!active) begin
          if (metric >= level) begin
            active <= 1'b1;
            mx   <= metric;
            age  <= '0;
            mdiv <= divisor;
            mre  <= dn_re;
            mim  <= dn_im;
          end
        end else if (metric < (level >> 1)) begin
          active     <= 1'b0;
          peak_valid <= 1'b1;
          peak_value <= mx;
          peak_age   <= (age == '1) ? age : age + 1'b1;
          peak_div   <= mdiv;
          peak_dn_re <= mre;
          peak_dn_im <= mim;
        end else if (metric > mx) begin
          mx   <= metric;
          age  <= '0;
          mdiv <= divisor;
          mre  <= dn_re;
          mim  <= dn_im;
        end else if (age == '1) begin
          // burst too long to time: report it and start again
          active     <= 1'b0;
          peak_valid <= 1'b1;
          peak_value <= mx; peak_age <= age; peak_div <= mdiv;
          peak_dn_re <= mre; peak_dn_im <= mim;
        end else begin
          age <= age + 1'b1;
        end
      end
    end
  end
endmodule
