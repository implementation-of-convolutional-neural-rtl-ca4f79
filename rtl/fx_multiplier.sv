// fx_multiplier: sign-magnitude fixed-point multiplier.
//
// The sign of the product is the XOR of the operand signs; the magnitude is
// the plain unsigned product of the two magnitudes, which carries
// 2*FRAC_BITS fraction bits. The product is then split again into an integer
// and a fraction part: the lowest FRAC_BITS fraction bits are dropped
// (truncation toward zero) and, if the integer part no longer fits in
// INT_BITS, the magnitude saturates to its largest value and ovf is set.
// A zero magnitude always gets a + sign. The dropped low fraction bits of
// the full product are intentionally left unused.
//
// Purely combinational. The sign-XOR / magnitude-product scheme and the
// 1+14+10 bit format follow the design's fixed-point arithmetic; truncation,
// saturation and the +0 rule are this design's choices.
module fx_multiplier #(
  parameter int unsigned INT_BITS  = 14,
  parameter int unsigned FRAC_BITS = 10,
  localparam int unsigned MAG = INT_BITS + FRAC_BITS
) (
  input  logic [MAG:0] a,     // {sign, magnitude}
  input  logic [MAG:0] b,
  output logic [MAG:0] p,
  output logic         ovf
);

  logic [2*MAG-1:0] full;     // 2*INT_BITS integer, 2*FRAC_BITS fraction bits
  logic [MAG-1:0]   mag;
  logic             sign;

  always_comb begin
    full = a[MAG-1:0] * b[MAG-1:0];
    ovf  = |full[2*MAG-1:MAG+FRAC_BITS];
    mag  = ovf ? '1 : full[MAG+FRAC_BITS-1:FRAC_BITS];
    sign = (a[MAG] ^ b[MAG]) & (|mag);
    p    = {sign, mag};
  end

endmodule
