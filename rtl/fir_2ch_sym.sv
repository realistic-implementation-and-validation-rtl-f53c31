// fir_2ch_sym: real-coefficient symmetric FIR filter with two interleaved
// input channels, the building block of the time-shared complex filter.
//
// The two channels (the I and Q components of one complex stream) arrive
// alternately on the same input, one real sample per valid cycle, with the
// channel number alongside. The delay line therefore holds 2*NTAPS samples
// and the taps of a channel sit two positions apart; both channels share
// one set of multipliers, which is the point of running the filter at twice
// the complex sample rate. The coefficient set is symmetric, so each pair of
// taps k and NTAPS-1-k is pre-added (EVEN) or pre-subtracted (ODD) before a
// single multiplication, halving the multiplier count.
//
// Timing: the delay line, then three register stages (pre-add, multiply,
// adder tree); out_valid/out_ch/out_data follow in_valid with a latency of
// 4 cycles. The full-precision sum is rounded by
// COEF_FRAC bits and saturated to OW bits.
//
// The document fixes 51 taps of 18-bit coefficients and two channels; the
// pipeline depth, the output width and the odd-symmetric option (needed by
// the imaginary coefficient set of a frequency-shifted filter) are this
// design's choices.
module fir_2ch_sym
  import fir_coef_pkg::*;
#(
  parameter int unsigned DW        = 16,
  parameter int unsigned OW        = 18,
  parameter int unsigned NT        = NTAPS,
  parameter bit          ODD_SYM   = 1'b0,
  parameter coef_t       COEFS [NT] = H_I
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_ch,
  input  logic signed [DW-1:0] in_data,
  output logic                 out_valid,
  output logic                 out_ch,
  output logic signed [OW-1:0] out_data
);
  localparam int unsigned NH   = (NT + 1) / 2;         // multipliers
  localparam int unsigned PW   = DW + 1;                // pre-add width
  localparam int unsigned MW   = PW + COEF_W;           // product width
  localparam int unsigned SW   = MW + $clog2(NH) + 1;   // sum width

  // Interleaved delay line: dl[2k + c] is tap k of the channel that is
  // c samples older than the newest one.
  logic signed [DW-1:0] dl [2*NT];
  logic signed [PW-1:0] pre  [NH];
  logic signed [MW-1:0] prod [NH];
  logic signed [SW-1:0] acc;
  logic [3:0] vpipe;
  logic [3:0] cpipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 2*int'(NT); i++) dl[i] <= '0;
    end else if (in_valid) begin
      dl[0] <= in_data;
      for (int i = 1; i < 2*int'(NT); i++) dl[i] <= dl[i-1];
    end
  end

  // stage 1: symmetric pre-addition, using the taps of the channel that
  // was just written (positions 0, 2, 4, ...)
  always_ff @(posedge clk) begin
    for (int k = 0; k < int'(NH); k++) begin
      if (k == int'(NT) - 1 - k)
        pre[k] <= PW'(dl[2*k]);
      else if (ODD_SYM)
        pre[k] <= PW'(dl[2*k]) - PW'(dl[2*(int'(NT)-1-k)]);
      else
        pre[k] <= PW'(dl[2*k]) + PW'(dl[2*(int'(NT)-1-k)]);
    end
  end

  // stage 2: one multiplier per coefficient pair
  always_ff @(posedge clk) begin
    for (int k = 0; k < int'(NH); k++)
      prod[k] <= MW'(pre[k]) * MW'(COEFS[k]);
  end

  // stage 3: adder tree
  always_ff @(posedge clk) begin
    logic signed [SW-1:0] s;
    s = '0;
    for (int k = 0; k < int'(NH); k++) s += SW'(prod[k]);
    acc <= s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpipe <= '0;
      cpipe <= '0;
    end else begin
      vpipe <= {vpipe[2:0], in_valid};
      cpipe <= {cpipe[2:0], in_ch};
    end
  end

  // rounding and saturation to OW bits
  localparam logic signed [SW-1:0] HALF = SW'(1) <<< (COEF_FRAC - 1);
  localparam logic signed [SW-1:0] OMAX = (SW'(1) <<< (OW - 1)) - 1;
  localparam logic signed [SW-1:0] OMIN = -(SW'(1) <<< (OW - 1));
  logic signed [SW-1:0] rnd;
  always_comb begin
    rnd = (acc + HALF) >>> COEF_FRAC;
    if (rnd > OMAX)      out_data = OMAX[OW-1:0];
    else if (rnd < OMIN) out_data = OMIN[OW-1:0];
    else                 out_data = rnd[OW-1:0];
  end
  assign out_valid = vpipe[3];
  assign out_ch    = cpipe[3];
endmodule
