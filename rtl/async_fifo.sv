// async_fifo: dual-clock FIFO for crossing between the 30.72 MHz baseband
// clock and the 61.44 MHz filter clock.
//
// Classic Gray-code pointer FIFO: each side keeps a binary pointer one bit
// wider than the address, converts it to Gray code, and the other side sees
// it through a two-flop synchroniser. "full" and "empty" are therefore
// pessimistic by the synchroniser latency, never optimistic. Storage is a
// plain array written on wclk and read combinationally at the read pointer
// (rdata shows the head entry whenever empty is low; rd pops it).
//
// Interface: wr/wdata/full on wclk, rd/rdata/empty on rclk, one active-low
// asynchronous-assert reset per side. A write while full or a read while
// empty is ignored (and flagged by an assertion). The document only says
// that FIFOs with independent read and write clocks do the crossing; the
// depth and the Gray-code scheme are this design's choice.
module async_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 8     // power of two
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic         empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in wclk domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in rclk domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  logic [AW:0] wbin_nxt;
  assign wbin_nxt = wbin + (AW+1)'(wr && !full);
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin  <= wbin_nxt;
      wgray <= bin2gray(wbin_nxt);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end
  always_ff @(posedge wclk) begin
    if (wr && !full) mem[wbin[AW-1:0]] <= wdata;
  end
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // read side
  logic [AW:0] rbin_nxt;
  assign rbin_nxt = rbin + (AW+1)'(rd && !empty);
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin  <= rbin_nxt;
      rgray <= bin2gray(rbin_nxt);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];

  initial assert (DEPTH >= 4 && (1 << AW) == DEPTH)
    else $error("async_fifo: DEPTH must be a power of two, at least 4");

  a_no_overflow: assert property (@(posedge wclk) disable iff (!wrst_n) !(wr && full))
    else $error("async_fifo: write while full");
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) !(rd && empty))
    else $error("async_fifo: read while empty");
endmodule
