// cordic_atan: vectoring CORDIC computing the angle of a complex value, used
// for the fractional carrier-frequency-offset (CFO) estimate.
//
// At a correlation peak dn = sum conj(s[t-N]) * s[t] has the angle
// 2*pi*CFO*N/fs, so the CFO phase rotation per sample is angle(dn)/N. The
// block scales (x, y) up to full range, rotates it towards the positive x axis in ITER shift-and-add
// steps, accumulating the rotation angles atan(2^-i), after a first
// rotation by pi when x < 0. Angles are 24-bit internally (2*pi = 2^24) and
// reported as 16 bits (2*pi = 2^16, two's complement, so the range is
// [-pi, pi)).
//
// phase_incr is the per-sample correction for the down-converter's DDS:
// -angle(dn)/2048. With a 27-bit DDS phase accumulator (2*pi = 2^27) this
// is numerically the same 16-bit word as -angle in 2^16 units, so no
// division is needed; the DDS is outside this design.
//
// Interface: start with x, y captures the operands; done pulses ITER+1
// cycles later with angle and phase_incr valid (they hold until the next
// done). start while busy is ignored.
//
// The CORDIC and its use for the fractional CFO follow the block diagram;
// iteration count, angle formats and the DDS scaling are this design's.
// Table: ATAN[i] = round(atan(2^-i) / (2*pi) * 2^24).
module cordic_atan #(
  parameter int unsigned XW   = 32,
  parameter int unsigned ITER = 18
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [XW-1:0] x,
  input  logic signed [XW-1:0] y,
  output logic                 busy,
  output logic                 done,
  output logic signed [15:0]   angle,
  output logic signed [15:0]   phase_incr
);
  localparam int unsigned IW = XW + 2;   // room for the CORDIC gain
  localparam logic [23:0] ATAN [18] = '{
    24'd2097152, 24'd1238021, 24'd654136, 24'd332050, 24'd166669, 24'd83416,
    24'd41718,   24'd20860,   24'd10430,  24'd5215,   24'd2608,   24'd1304,
    24'd652,     24'd326,     24'd163,    24'd81,     24'd41,     24'd20
  };

  logic signed [IW-1:0] xr, yr;

  // Normalisation: small vectors are shifted up until the larger component
  // reaches bit XW-3, so that the shifts of the iterations keep precision.
  logic [XW-1:0] ax, ay, am;
  logic [$clog2(XW)-1:0] norm;
  always_comb begin
    ax = (x < 0) ? XW'(-x) : XW'(x);
    ay = (y < 0) ? XW'(-y) : XW'(y);
    am = ax | ay;
    norm = '0;
    for (int k = 0; k <= XW - 3; k++)
      if (am < (XW'(1) << (XW - 3 - k))) norm = ($clog2(XW))'(k);
  end
  logic [23:0] z;
  logic [$clog2(ITER+1)-1:0] it;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0;
      xr <= '0; yr <= '0; z <= '0; it <= '0;
      angle <= '0; phase_incr <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          it   <= '0;
          if (x < 0) begin
            xr <= -(IW'(x) <<< norm);
            yr <= -(IW'(y) <<< norm);
            z  <= 24'h800000;   // pi
          end else begin
            xr <= IW'(x) <<< norm;
            yr <= IW'(y) <<< norm;
            z  <= '0;
          end
        end
      end else if (it == ($clog2(ITER+1))'(ITER)) begin
        busy       <= 1'b0;
        done       <= 1'b1;
        angle      <= z[23:8] + 16'(z[7]);     // rounded to 16 bits
        phase_incr <= -(z[23:8] + 16'(z[7]));
      end else begin
        if (yr > 0) begin
          xr <= xr + (yr >>> it);
          yr <= yr - (xr >>> it);
          z  <= z + ATAN[it];
        end else begin
          xr <= xr - (yr >>> it);
          yr <= yr + (xr >>> it);
          z  <= z - ATAN[it];
        end
        it <= it + 1'b1;
      end
    end
  end
endmodule
