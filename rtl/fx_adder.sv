// fx_adder: sign-magnitude fixed-point adder.
//
// Equal signs: the magnitudes are added and the common sign is kept.
// Different signs: the smaller magnitude is subtracted from the larger one and
// the result takes the sign of the larger operand. A carry out of the
// magnitude saturates the result to the largest magnitude and sets ovf. A
// zero result always gets a + sign.
//
// Purely combinational. The number format (1 sign, INT_BITS integer,
// FRAC_BITS fraction bits) follows the design's fixed-point package; how the
// addition is carried out, the saturation and the +0 rule are this design's
// own choices.
module fx_adder #(
  parameter int unsigned INT_BITS  = 14,
  parameter int unsigned FRAC_BITS = 10,
  localparam int unsigned MAG = INT_BITS + FRAC_BITS
) (
  input  logic [MAG:0] a,     // {sign, magnitude}
  input  logic [MAG:0] b,
  output logic [MAG:0] s,
  output logic         ovf
);

  logic [MAG:0]   sum;        // one extra bit for the carry
  logic [MAG-1:0] mag;
  logic           sign;
  logic           a_ge_b;

  always_comb begin
    a_ge_b = a[MAG-1:0] >= b[MAG-1:0];
    if (a[MAG] == b[MAG]) begin
      sum  = {1'b0, a[MAG-1:0]} + {1'b0, b[MAG-1:0]};
      sign = a[MAG];
    end else if (a_ge_b) begin
      sum  = {1'b0, a[MAG-1:0]} - {1'b0, b[MAG-1:0]};
      sign = a[MAG];
    end else begin
      sum  = {1'b0, b[MAG-1:0]} - {1'b0, a[MAG-1:0]};
      sign = b[MAG];
    end
    ovf = sum[MAG];
    mag = ovf ? '1 : sum[MAG-1:0];
    s   = {sign & (|mag), mag};
  end

endmodule
