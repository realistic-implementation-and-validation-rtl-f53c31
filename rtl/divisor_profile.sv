// divisor_profile: profile of the correlation divisor ds0*ds1.
//
// The divisor is large while user data is received and small in the
// quasi-quiet periods, where only reference signals are sent; this is how a
// correlation peak is classified as a data symbol or a silence symbol. The
// block keeps the largest divisor seen and offers the threshold
// max >> TH_SHIFT (half the maximum by default). Whenever the AGC changes
// its gain (gain_value differs from the previous value) the received power,
// and with it the divisor scale, changes, so the maximum is restarted from
// the current divisor. clear empties the profile.
//
// peak_div is classified combinationally: peak_above = peak_div > threshold.
// Timing: max_div and threshold update one cycle after each valid sample.
// The top TH_SHIFT bits of threshold are zero by construction (a shifted
// copy of the maximum); they are kept so that threshold and max_div share
// one width.
//
// The document states that the peak values of the divisor are tracked with
// the AGC gain variations taken into account; the restart-on-gain-change
// rule and the half-maximum threshold are this design's choices.
module divisor_profile #(
  parameter int unsigned GW       = 8,
  parameter int unsigned TH_SHIFT = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          in_valid,
  input  logic [31:0]   divisor,
  input  logic [GW-1:0] gain_value,
  input  logic [31:0]   peak_div,
  output logic [31:0]   max_div,
  output logic [31:0]   threshold,
  output logic          peak_above,
  output logic          gain_changed
);
  logic [GW-1:0] gain_q;

  assign gain_changed = (gain_value != gain_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max_div <= '0;
      gain_q  <= '0;
    end else begin
      gain_q <= gain_value;
      if (clear)
        max_div <= '0;
      else if (gain_changed)
        max_div <= in_valid ? divisor : '0;
      else if (in_valid && divisor > max_div)
        max_div <= divisor;
    end
  end

  assign threshold  = max_div >> TH_SHIFT;
  assign peak_above = (peak_div > threshold);
endmodule
