// cplx_halfband_filter: splits the complex baseband stream into its low and
// high 10 MHz halves with two real FIR filters shared in time.
//
// The low-band filter is h_low = h_i + j*h_q and the high-band filter its
// conjugate h_high = h_i - j*h_q. Writing s = s_i + j*s_q, both outputs are
// built from the same four real convolutions:
//   low_i  = s_i*h_i - s_q*h_q      low_q  = s_q*h_i + s_i*h_q
//   high_i = s_i*h_i + s_q*h_q      high_q = s_q*h_i - s_i*h_q
// so only two real filters (h_i, h_q) are needed. Each runs at twice the
// complex sample rate (clk2x) with two interleaved channels: in the first
// half of a baseband period both filters take s_i, in the second half s_q.
//
// Datapath (all on clk2x unless stated):
//   1. mux FIFO: {s_i, s_q} written on clk (30.72 MHz), read on clk2x;
//   2. a two-phase selector feeds s_i (channel 0) then s_q (channel 1) to
//      both filters and pops the FIFO after s_q;
//   3. the filter outputs of channel 0 (s_i*h_i, s_i*h_q) and channel 1
//      (s_q*h_i, s_q*h_q) are held in four registers;
//   4. one adder and one subtractor per output component form the two
//      complex results, saturated to DW bits;
//   5. two demux FIFOs (low, high) are written on clk2x and read on clk.
// On the clk side out_valid pulses once per filtered sample; in steady
// state with in_valid held high this is every clk cycle. Latency is a fixed
// number of clk cycles for a given clock phase relation (about 7 clk
// cycles with clk2x edge-aligned to clk).
//
// The structure, the coefficient relation and the clock ratio follow the
// document. FIFO depths, rounding, saturation and the single reset shared
// by both clock domains (asserted asynchronously, released while both
// clocks run) are this design's choices.
module cplx_halfband_filter
  import fir_coef_pkg::*;
#(
  parameter int unsigned DW = 16,
  parameter int unsigned FW = DW + 2    // filter output width
) (
  input  logic                 clk,      // baseband clock, 30.72 MHz
  input  logic                 clk2x,    // filter clock, 61.44 MHz
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  output logic                 out_valid,
  output logic signed [DW-1:0] low_i,
  output logic signed [DW-1:0] low_q,
  output logic signed [DW-1:0] high_i,
  output logic signed [DW-1:0] high_q
);
  // ---------------- step 1: multiplexing FIFO --------------------------
  logic              mux_empty, mux_full, mux_rd;
  logic [2*DW-1:0]   mux_rdata;

  async_fifo #(.W(2*DW), .DEPTH(8)) u_mux_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr(in_valid && !mux_full), .wdata({in_i, in_q}),
    .full(mux_full),
    .rclk(clk2x), .rrst_n(rst_n), .rd(mux_rd), .rdata(mux_rdata), .empty(mux_empty)
  );

  // ---------------- step 2: channel selector ---------------------------
  logic                 phase;      // 0: feed s_i, 1: feed s_q
  logic                 fir_in_valid;
  logic signed [DW-1:0] fir_in;

  always_ff @(posedge clk2x or negedge rst_n) begin
    if (!rst_n) phase <= 1'b0;
    else if (phase == 1'b0 && !mux_empty) phase <= 1'b1;
    else if (phase == 1'b1) phase <= 1'b0;
  end
  // in phase 1 the entry is still at the head (it is popped at the end of
  // phase 1), so the FIFO is known to be non-empty
  assign fir_in_valid = (phase == 1'b1) || !mux_empty;
  assign fir_in       = phase ? mux_rdata[DW-1:0] : mux_rdata[2*DW-1:DW];
  assign mux_rd       = (phase == 1'b1);

  // ---------------- the two shared real filters ------------------------
  logic                 hi_v, hi_ch, hq_v, hq_ch;
  logic signed [FW-1:0] hi_y, hq_y;

  fir_2ch_sym #(.DW(DW), .OW(FW), .NT(NTAPS), .ODD_SYM(1'b0), .COEFS(H_I)) u_fir_hi (
    .clk(clk2x), .rst_n(rst_n), .in_valid(fir_in_valid), .in_ch(phase), .in_data(fir_in),
    .out_valid(hi_v), .out_ch(hi_ch), .out_data(hi_y)
  );
  fir_2ch_sym #(.DW(DW), .OW(FW), .NT(NTAPS), .ODD_SYM(1'b1), .COEFS(H_Q)) u_fir_hq (
    .clk(clk2x), .rst_n(rst_n), .in_valid(fir_in_valid), .in_ch(phase), .in_data(fir_in),
    .out_valid(hq_v), .out_ch(hq_ch), .out_data(hq_y)
  );

  // ---------------- step 3: output registers ---------------------------
  logic signed [FW-1:0] r_si_hi, r_si_hq, r_sq_hi, r_sq_hq;
  logic                 comb_go;

  always_ff @(posedge clk2x or negedge rst_n) begin
    if (!rst_n) begin
      r_si_hi <= '0; r_si_hq <= '0; r_sq_hi <= '0; r_sq_hq <= '0;
      comb_go <= 1'b0;
    end else begin
      comb_go <= 1'b0;
      if (hi_v && !hi_ch) begin
        r_si_hi <= hi_y;
        r_si_hq <= hq_y;
      end
      if (hi_v && hi_ch) begin
        r_sq_hi <= hi_y;
        r_sq_hq <= hq_y;
        comb_go <= 1'b1;
      end
    end
  end

  // ---------------- step 4: combination --------------------------------
  function automatic logic signed [DW-1:0] sat(logic signed [FW:0] v);
    localparam logic signed [FW:0] MX = (FW+1)'((1 << (DW-1)) - 1);
    localparam logic signed [FW:0] MN = -(FW+1)'(1 << (DW-1));
    if (v > MX) return MX[DW-1:0];
    if (v < MN) return MN[DW-1:0];
    return v[DW-1:0];
  endfunction

  logic signed [DW-1:0] c_low_i, c_low_q, c_high_i, c_high_q;
  always_comb begin
    c_low_i  = sat((FW+1)'(r_si_hi) - (FW+1)'(r_sq_hq));
    c_low_q  = sat((FW+1)'(r_sq_hi) + (FW+1)'(r_si_hq));
    c_high_i = sat((FW+1)'(r_si_hi) + (FW+1)'(r_sq_hq));
    c_high_q = sat((FW+1)'(r_sq_hi) - (FW+1)'(r_si_hq));
  end

  // ---------------- step 5: demultiplexing FIFOs -----------------------
  logic lo_full, hi_full, lo_empty, hi_empty, out_rd;
  logic [2*DW-1:0] lo_rdata, hi_rdata;

  async_fifo #(.W(2*DW), .DEPTH(8)) u_low_fifo (
    .wclk(clk2x), .wrst_n(rst_n), .wr(comb_go && !lo_full), .wdata({c_low_i, c_low_q}),
    .full(lo_full),
    .rclk(clk), .rrst_n(rst_n), .rd(out_rd), .rdata(lo_rdata), .empty(lo_empty)
  );
  async_fifo #(.W(2*DW), .DEPTH(8)) u_high_fifo (
    .wclk(clk2x), .wrst_n(rst_n), .wr(comb_go && !hi_full), .wdata({c_high_i, c_high_q}),
    .full(hi_full),
    .rclk(clk), .rrst_n(rst_n), .rd(out_rd), .rdata(hi_rdata), .empty(hi_empty)
  );
  assign out_rd = !lo_empty && !hi_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      low_i <= '0; low_q <= '0; high_i <= '0; high_q <= '0;
    end else begin
      out_valid <= out_rd;
      if (out_rd) begin
        {low_i, low_q}   <= lo_rdata;
        {high_i, high_q} <= hi_rdata;
      end
    end
  end
endmodule
