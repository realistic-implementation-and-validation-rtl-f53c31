// pn20_prbs: 2^20-1 pseudorandom bit sequence generator (ITU-T O.150 PN20)
// for the femto BS data.
//
// A 20-stage Fibonacci shift register with feedback polynomial
// x^20 + x^3 + 1: the new bit is the XOR of stages 3 and 20. Each enabled
// cycle produces B consecutive bits of the sequence, bits[B-1] being the
// earliest. load writes a new (non-zero) seed; an all-zero seed is
// replaced by all ones, since the all-zero state does not advance.
//
// Timing: bits is registered and valid the cycle after en.
// The choice of the PN20 sequence follows the document; the polynomial is
// that of the ITU-T recommendation, and the B-bit output (B = 2 gives one
// QPSK symbol per cycle) is this design's choice.
module pn20_prbs #(
  parameter int unsigned B = 2,
  parameter logic [19:0] SEED = 20'hFFFFF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [19:0]  seed,
  input  logic         en,
  output logic         valid,
  output logic [B-1:0] bits
);
  logic [19:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr    <= SEED;
      valid <= 1'b0;
      bits  <= '0;
    end else begin
      valid <= 1'b0;
      if (load) begin
        sr <= (seed == '0) ? '1 : seed;
      end else if (en) begin
        logic [19:0] s;
        logic        nb;
        s = sr;
        for (int k = B - 1; k >= 0; k--) begin
          nb = s[19] ^ s[2];
          bits[k] <= nb;
          s = {s[18:0], nb};
        end
        sr    <= s;
        valid <= 1'b1;
      end
    end
  end
endmodule
