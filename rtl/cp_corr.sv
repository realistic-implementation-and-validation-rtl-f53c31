// cp_corr: recursive cyclic-prefix cross-correlation.
//
// For the stream s[t] it keeps, for the window of the last L samples,
//   dn  = sum_{l<L} conj(s[t-N-l]) * s[t-l]     (complex, lag N)
//   ds0 = sum_{l<L} |s[t-N-l]|^2
//   ds1 = sum_{l<L} |s[t-l]|^2
// The sums are not recomputed: each new sample adds the newest product and
// subtracts the one leaving the window, so every sum needs only four
// samples per step: s[t], s[t-N], s[t-L] and s[t-N-L]. These come from one
// circular delay memory of N+L complex samples with three read taps. When
// the window slides over a CP (a copy of the last CP_LEN samples of the
// symbol, N samples later) |dn|^2/(ds0*ds1) peaks near one.
//
// restart clears the three sums (the sample arriving in the same cycle, if
// any, becomes the first of the new window); for the next L samples
// products are only added (the first case of the recursion), after which the sums again
// cover exactly L samples. The first N+L samples after reset are treated
// as zero history. All arithmetic is exact integer arithmetic.
//
// Interface: in_valid/in_i/in_q stream (one sample per valid cycle);
// out_valid follows in_valid 3 cycles later with the sums that include that
// sample, together with tap_i/tap_q = s[t-N-L], the oldest stored sample,
// which the data forwarding uses as its read port.
//
// The recursion, the lag (2048) and the window lengths (467, 416) follow
// the document; widths and the pipeline are this design's choices.
module cp_corr #(
  parameter int unsigned DW = 16,
  parameter int unsigned N  = 2048,
  parameter int unsigned L  = 467,
  localparam int unsigned AW = 2*DW + 1 + $clog2(L),  // dn width (signed)
  localparam int unsigned EW = 2*DW + $clog2(L)       // ds width (unsigned)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 restart,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_i,
  input  logic signed [DW-1:0] in_q,
  output logic                 out_valid,
  output logic signed [AW-1:0] dn_re,
  output logic signed [AW-1:0] dn_im,
  output logic        [EW-1:0] ds0,
  output logic        [EW-1:0] ds1,
  output logic signed [DW-1:0] tap_i,
  output logic signed [DW-1:0] tap_q
);
  localparam int unsigned D   = N + L;
  localparam int unsigned PA  = $clog2(D);
  localparam int unsigned PW  = 2*DW + 1;   // one complex product component

  typedef struct packed {
    logic signed [DW-1:0] i;
    logic signed [DW-1:0] q;
  } cs_t;

  cs_t mem [D];
  logic [PA-1:0] wp;
  logic [PA:0]   hist;      // samples written since reset, saturates at D
  logic [$clog2(L+1)-1:0] fill;  // samples accumulated since restart

  function automatic logic [PA-1:0] back(logic [PA-1:0] p, int unsigned k);
    // address k samples before p in the circular memory
    logic [PA:0] t;
    t = {1'b0, p} + (PA+1)'(D - k);
    if (t >= (PA+1)'(D)) t = t - (PA+1)'(D);
    return t[PA-1:0];
  endfunction

  // |x|^2 of a complex sample; fits 2*DW unsigned bits
  function automatic logic [2*DW-1:0] mag2(cs_t x);
    logic signed [2*DW-1:0] pi, pq;
    pi = (2*DW)'(x.i) * (2*DW)'(x.i);
    pq = (2*DW)'(x.q) * (2*DW)'(x.q);
    return unsigned'(pi) + unsigned'(pq);
  endfunction

  // ---- stage 1: write and read the four samples ----
  cs_t a1, b1, c1, d1;
  logic v1, sub1, rs1;
  always_ff @(posedge clk) begin
    if (in_valid) mem[wp] <= '{i: in_i, q: in_q};
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; hist <= '0; fill <= '0;
      v1 <= 1'b0; sub1 <= 1'b0; rs1 <= 1'b0;
      a1 <= '0; b1 <= '0; c1 <= '0; d1 <= '0;
    end else begin
      v1  <= in_valid;
      rs1 <= restart;
      if (restart) fill <= in_valid ? ($clog2(L+1))'(1) : '0;
      if (in_valid) begin
        wp   <= (wp == PA'(D - 1)) ? '0 : wp + 1'b1;
        if (hist != (PA+1)'(D)) hist <= hist + 1'b1;
        if (!restart && fill != ($clog2(L+1))'(L)) fill <= fill + 1'b1;
        a1 <= '{i: in_i, q: in_q};
        b1 <= (hist >= (PA+1)'(N))   ? mem[back(wp, N)]     : '0;
        c1 <= (hist >= (PA+1)'(L))   ? mem[back(wp, L)]     : '0;
        d1 <= (hist == (PA+1)'(D))   ? mem[wp]              : '0;  // N+L back
        sub1 <= !restart && (fill == ($clog2(L+1))'(L));
      end
    end
  end

  // ---- stage 2: products ----
  logic signed [PW-1:0] pn_re, pn_im, po_re, po_im;
  logic        [2*DW-1:0] e1n, e1o, e0n, e0o;
  logic v2, sub2, rs2;
  cs_t d2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; sub2 <= 1'b0; rs2 <= 1'b0; d2 <= '0;
      pn_re <= '0; pn_im <= '0; po_re <= '0; po_im <= '0;
      e1n <= '0; e1o <= '0; e0n <= '0; e0o <= '0;
    end else begin
      v2   <= v1;
      rs2  <= rs1;
      if (v1) begin
        sub2 <= sub1;
        d2   <= d1;
        // conj(b) * a
        pn_re <= PW'(b1.i * a1.i) + PW'(b1.q * a1.q);
        pn_im <= PW'(b1.i * a1.q) - PW'(b1.q * a1.i);
        // conj(d) * c
        po_re <= PW'(d1.i * c1.i) + PW'(d1.q * c1.q);
        po_im <= PW'(d1.i * c1.q) - PW'(d1.q * c1.i);
        e1n <= mag2(a1);
        e1o <= mag2(c1);
        e0n <= mag2(b1);
        e0o <= mag2(d1);
      end
    end
  end

  // ---- stage 3: recursive update ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      dn_re <= '0; dn_im <= '0; ds0 <= '0; ds1 <= '0;
      tap_i <= '0; tap_q <= '0;
    end else begin
      out_valid <= v2;
      if (rs2) begin
        // a restart starts the sums afresh with the sample that came with it
        dn_re <= v2 ? AW'(pn_re) : '0;
        dn_im <= v2 ? AW'(pn_im) : '0;
        ds0   <= v2 ? EW'(e0n)   : '0;
        ds1   <= v2 ? EW'(e1n)   : '0;
      end else if (v2) begin
        dn_re <= dn_re + AW'(pn_re) - (sub2 ? AW'(po_re) : '0);
        dn_im <= dn_im + AW'(pn_im) - (sub2 ? AW'(po_im) : '0);
        ds0   <= ds0 + EW'(e0n) - (sub2 ? EW'(e0o) : '0);
        ds1   <= ds1 + EW'(e1n) - (sub2 ? EW'(e1o) : '0);
      end
      if (v2) begin
        tap_i <= d2.i;
        tap_q <= d2.q;
      end
    end
  end
endmodule
