// ofdm_stim: test-only source of a macro-cell downlink as seen by the
// macro UE after down-conversion (not synthesizable; used by the system
// testbenches).
//
// One complex sample per clock while en is high. Frames of FRAME_SYMS
// OFDM symbols; each symbol is N random samples (a white stand-in for the
// IFFT output of random QPSK subcarriers) preceded by a copy of its last CP
// samples. Symbols QUIET_FIRST .. QUIET_FIRST+QUIET_SYMS-1 of each frame
// are the quasi-quiet period (reference signals only): sent with 1/16 of
// the amplitude. A weak white noise (amplitude/128) is always added.
//
// Interference, switched by the inputs:
//   lo_on  band-limited noise in the lower half of the band: white noise
//          through an 8-sample moving sum, moved to -fs/4 by (-j)^n;
//   hi_on  the same, moved to +fs/4 by (+j)^n;
//   wb_on  white noise over the whole band.
// Each source has its own amplitude input. The noise is not synchronized
// to the frame, like a femto-cell transmitter.
// A carrier frequency offset of cfo (radians per sample) rotates the
// whole received signal.
//
// Outputs: valid/i/q, plus the position of the sample (frame, symbol,
// index in the symbol) for the checking code.
module ofdm_stim #(
  parameter int N = 2048,
  parameter int CP = 512,
  parameter int FRAME_SYMS = 60,
  parameter int QUIET_FIRST = 48,
  parameter int QUIET_SYMS = 12,
  parameter int AMP = 4096,
  parameter int DW = 16
) (
  input  logic clk,
  input  logic en,
  input  logic lo_on, hi_on, wb_on,
  input  int   lo_amp, hi_amp, wb_amp,
  input  real  cfo,
  output logic valid,
  output logic signed [DW-1:0] out_i,
  output logic signed [DW-1:0] out_q,
  output int   frame_no,
  output int   sym_no,
  output int   samp_no
);
  real sym_i [N];
  real sym_q [N];
  real ma_lo_i [8], ma_lo_q [8], ma_hi_i [8], ma_hi_q [8];
  real phase;
  int  n;
  int  f_c, s_c, k_c;                 // position of the next sample

  function automatic real rnd();      // uniform in [-1, 1)
    return (real'($urandom_range(0, 65535)) - 32768.0) / 32768.0;
  endfunction

  function automatic logic signed [DW-1:0] sat(real v);
    if (v > 32767.0) return 16'sd32767;
    if (v < -32768.0) return -16'sd32768;
    return DW'($rtoi(v));
  endfunction

  task automatic new_symbol();
    for (int k = 0; k < N; k++) begin
      sym_i[k] = rnd() * AMP;
      sym_q[k] = rnd() * AMP;
    end
  endtask

  initial begin
    frame_no = 0; sym_no = 0; samp_no = 0; n = 0; f_c = 0; s_c = 0; k_c = 0; phase = 0.0;
    valid = 0; out_i = 0; out_q = 0;
    for (int k = 0; k < 8; k++) begin
      ma_lo_i[k] = 0.0; ma_lo_q[k] = 0.0; ma_hi_i[k] = 0.0; ma_hi_q[k] = 0.0;
    end
    new_symbol();
  end

  always @(posedge clk) begin
    real si, sq, g, li, lq, hi, hq, a, b;
    if (en) begin
      // desired signal
      g = (s_c >= QUIET_FIRST && s_c < QUIET_FIRST + QUIET_SYMS) ? 1.0 / 16.0 : 1.0;
      if (k_c < CP) begin
        si = sym_i[N - CP + k_c]; sq = sym_q[N - CP + k_c];
      end else begin
        si = sym_i[k_c - CP]; sq = sym_q[k_c - CP];
      end
      si = si * g + rnd() * AMP / 128.0;
      sq = sq * g + rnd() * AMP / 128.0;
      // band-limited interferers
      for (int k = 7; k > 0; k--) begin
        ma_lo_i[k] = ma_lo_i[k-1]; ma_lo_q[k] = ma_lo_q[k-1];
        ma_hi_i[k] = ma_hi_i[k-1]; ma_hi_q[k] = ma_hi_q[k-1];
      end
      ma_lo_i[0] = rnd(); ma_lo_q[0] = rnd(); ma_hi_i[0] = rnd(); ma_hi_q[0] = rnd();
      li = 0.0; lq = 0.0; hi = 0.0; hq = 0.0;
      for (int k = 0; k < 8; k++) begin
        li += ma_lo_i[k]; lq += ma_lo_q[k]; hi += ma_hi_i[k]; hq += ma_hi_q[k];
      end
      li = li / 8.0 * lo_amp; lq = lq / 8.0 * lo_amp;
      hi = hi / 8.0 * hi_amp; hq = hq / 8.0 * hi_amp;
      if (lo_on)
        case (n % 4)     // times (-j)^n
          0: begin si += li; sq += lq; end
          1: begin si += lq; sq -= li; end
          2: begin si -= li; sq -= lq; end
          default: begin si -= lq; sq += li; end
        endcase
      if (hi_on)
        case (n % 4)     // times (+j)^n
          0: begin si += hi; sq += hq; end
          1: begin si -= hq; sq += hi; end
          2: begin si -= hi; sq -= hq; end
          default: begin si += hq; sq -= hi; end
        endcase
      if (wb_on) begin
        si += rnd() * wb_amp; sq += rnd() * wb_amp;
      end
      // carrier frequency offset
      a = si * $cos(phase) - sq * $sin(phase);
      b = si * $sin(phase) + sq * $cos(phase);
      phase = phase + cfo;
      if (phase > 3.14159265358979) phase = phase - 6.28318530717959;
      valid <= 1'b1;
      out_i <= sat(a);
      out_q <= sat(b);
      n++;
      frame_no <= f_c;
      sym_no <= s_c;
      samp_no <= k_c;
      if (k_c == N + CP - 1) begin
        k_c = 0;
        new_symbol();
        if (s_c == FRAME_SYMS - 1) begin
          s_c = 0;
          f_c++;
        end else s_c++;
      end else k_c++;
    end else valid <= 1'b0;
  end
endmodule
