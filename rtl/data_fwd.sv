// data_fwd: forwards the FFT window of every OFDM symbol of a detected 5 ms
// frame to the FFT, dropping the cyclic prefixes.
//
// The input stream is the oldest sample of the correlation delay memory,
// s[t-N-L], on the same sample time line as the correlation metric. When
// the controller detects the first data symbol of a frame it pulses start
// with the age of the correlation peak (samples since the peak, i.e. since
// the last sample of that symbol), counted up to the sample before the
// report. The first FFT-window sample s[t_p-N+1] then leaves the delay
// memory L-age samples after the one present with start. From there the block passes
// N samples (one FFT window, fft_first on the first), skips CP_LEN samples
// (the next prefix), and repeats for n_syms symbols on the fixed
// N+CP_LEN grid; then frame_done pulses.
//
// Interface: in_valid/in_i/in_q is the tap stream, fft_valid/fft_first/
// fft_i/fft_q the forwarded samples (registered, one cycle later),
// sym_idx the symbol being forwarded. A start while a frame is being
// forwarded is ignored. If age > L+1 the window is already partly gone and
// forwarding starts at once (late by age-L samples).
//
// Forwarding from the delay memory after the peak and the CP removal follow
// the document; the free-running symbol grid after the first peak is this
// design's choice.
module data_fwd #(
  parameter int unsigned DW     = 16,
  parameter int unsigned N      = 2048,
  parameter int unsigned CP     = 512,
  parameter int unsigned L      = 467,
  parameter int unsigned IW     = 10,
  parameter int unsigned SW     = 8     // symbol counter width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [IW-1:0]        age,
  input  logic [SW-1:0]        n_syms,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  output logic                 busy,
  output logic                 fft_valid,
  output logic                 fft_first,
  output logic signed [DW-1:0] fft_i,
  output logic signed [DW-1:0] fft_q,
  output logic [SW-1:0]        sym_idx,
  output logic                 frame_done
);
  typedef enum logic [1:0] {F_IDLE, F_WAIT, F_WIN, F_CP} fstate_t;
  localparam int unsigned CW = $clog2(N + 1);

  fstate_t st;
  logic [CW-1:0] cnt;
  logic [SW-1:0] n_q;     // frame length latched at start
  logic [SW-1:0] sym;     // symbol being forwarded

  // A start is acted on in its own cycle: the sample present then is the
  // first one after the peak report and already counts.
  fstate_t st_e;
  logic [CW-1:0] cnt_e;
  always_comb begin
    st_e  = st;
    cnt_e = cnt;
    if (st == F_IDLE && start && n_syms != '0) begin
      st_e  = F_WAIT;
      cnt_e = (CW'(age) >= CW'(L)) ? '0 : CW'(L) - CW'(age);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= F_IDLE; cnt <= '0; sym_idx <= '0; sym <= '0; n_q <= '0;
      fft_valid <= 1'b0; fft_first <= 1'b0; fft_i <= '0; fft_q <= '0;
      frame_done <= 1'b0;
    end else begin
      fft_valid  <= 1'b0;
      fft_first  <= 1'b0;
      frame_done <= 1'b0;
      st  <= st_e;
      cnt <= cnt_e;
      if (st == F_IDLE) begin
        sym <= '0;
        n_q <= n_syms;
      end
      case (st_e)
        F_IDLE: ;
        F_WAIT: if (in_valid) begin
          if (cnt_e == '0) begin
            // first sample of the FFT window
            fft_valid <= 1'b1; fft_first <= 1'b1;
            fft_i <= in_i; fft_q <= in_q;
            sym_idx <= '0;
            cnt <= CW'(N - 1);
            st  <= F_WIN;
          end else cnt <= cnt_e - 1'b1;
        end
        F_WIN: if (in_valid) begin
          fft_valid <= 1'b1;
          fft_first <= (cnt == CW'(N));
          fft_i <= in_i; fft_q <= in_q;
          sym_idx <= sym;
          if (cnt == CW'(1)) begin
            if (sym == n_q - 1'b1) begin
              frame_done <= 1'b1;
              st <= F_IDLE;
            end else begin
              sym <= sym + 1'b1;
              cnt <= CW'(CP);
              st  <= F_CP;
            end
          end else cnt <= cnt - 1'b1;
        end
        F_CP: if (in_valid) begin
          if (cnt == CW'(1)) begin
            cnt <= CW'(N);
            st  <= F_WIN;
          end else cnt <= cnt - 1'b1;
        end
        default: st <= F_IDLE;
      endcase
    end
  end
  assign busy = (st != F_IDLE);
endmodule
