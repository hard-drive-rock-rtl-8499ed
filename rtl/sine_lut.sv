// sine_lut: quarter-wave sine table for the tone generators.
//
// Holds the first quadrant (0 to 90 degrees) of a sine wave as 2^ADDR_W
// unsigned AMP_W-bit amplitudes; the other three quadrants are produced by the
// caller, which reads the table backwards and/or negates the result. Entry i
// is round((2^AMP_W - 1) * sin(pi/2 * (i + 0.5) / 2^ADDR_W)). The half-step
// offset makes the table exactly symmetric under index inversion (~i), so the
// second quadrant is read with the bitwise complement of the address.
//
// The table is filled at elaboration by an integer Taylor series (terms up
// to x^11 in Q30 fixed point, error far below one LSB), so no data file is
// needed. Reading is combinational: amplitude follows addr in the same cycle;
// the caller registers it.
//
// The quarter-wave organisation, the 1024-entry depth and the 8-bit width are
// those of the original design; the sampling points and the rounding are this
// implementation's choice.
module sine_lut #(
  parameter int unsigned ADDR_W = hdr_pkg::LUT_ADDR_W,
  parameter int unsigned AMP_W  = hdr_pkg::AMP_W
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [AMP_W-1:0]  amplitude
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;
  // pi/2 in Q30
  localparam longint HALF_PI_Q30 = 64'd1686629713;

  // round((2^AMP_W - 1) * sin(pi/2 * (2*i + 1) / 2^(ADDR_W+1)))
  function automatic logic [AMP_W-1:0] quarter_sine(input int unsigned i);
    longint x, x2, term, sum, scaled;
    x    = (HALF_PI_Q30 * longint'(2 * i + 1)) >>> (ADDR_W + 1);
    x2   = (x * x) >>> 30;
    term = x;
    sum  = x;
    for (int k = 1; k <= 5; k++) begin
      term = -((term * x2) >>> 30) / longint'((2 * k) * (2 * k + 1));
      sum  = sum + term;
    end
    scaled = (sum * longint'(2 ** AMP_W - 1) + (64'sd1 <<< 29)) >>> 30;
    if (scaled > longint'(2 ** AMP_W - 1)) scaled = longint'(2 ** AMP_W - 1);
    if (scaled < 0) scaled = 0;
    return AMP_W'(scaled);
  endfunction

  logic [AMP_W-1:0] rom [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) rom[i] = quarter_sine(i);
  end

  assign amplitude = rom[addr];

endmodule
