// neuron: one multiply-accumulate neuron, u = sum_i(x_i * w_i) + bias.
//
// Datapath: a fixed-point multiplier feeding a product register, an adder
// whose other operand is the accumulator register fed back, and a counter of
// accumulated products. The layer drives the three steps of one input with
// one-cycle strobes:
//   mul_en  : prod <= x * w           (x and w must be valid this cycle)
//   acc_en  : acc  <= acc + prod, count <= count + 1
//   bias_en : acc  <= acc + w, with w carrying the bias word; done is set
//             once the counter has reached N_IN
// clear starts a new sum (acc, count, done and sat go to zero). y is the
// accumulator register; done stays high until the next clear. sat is a
// sticky flag set when a product or a sum had to saturate.
//
// The multiplier / adder / counter structure and adding the bias after the
// weighted inputs follow the design; the strobe interface, saturation and the
// sticky flag are this design's own.
module neuron
  import nn_pkg::*;
#(
  parameter int unsigned N_IN = 784,
  localparam int unsigned CW = $clog2(N_IN + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic mul_en,
  input  logic acc_en,
  input  logic bias_en,
  input  fx_t  x,
  input  fx_t  w,
  output fx_t  y,
  output logic done,
  output logic sat
);

  fx_t           prod_d, prod_q, acc_q, sum_d, add_b;
  logic          mul_ovf, add_ovf;
  logic [CW-1:0] count;

  fx_multiplier #(.INT_BITS(FX_INT), .FRAC_BITS(FX_FRAC)) u_mul (
    .a(x), .b(w), .p(prod_d), .ovf(mul_ovf)
  );

  // The adder takes the product while accumulating and the bias word
  // (arriving on w) in the bias step.
  assign add_b = bias_en ? w : prod_q;

  fx_adder #(.INT_BITS(FX_INT), .FRAC_BITS(FX_FRAC)) u_add (
    .a(acc_q), .b(add_b), .s(sum_d), .ovf(add_ovf)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      prod_q <= FX_ZERO;
      acc_q  <= FX_ZERO;
      count  <= '0;
      done   <= 1'b0;
      sat    <= 1'b0;
    end else begin
      if (mul_en) begin
        prod_q <= prod_d;
        if (mul_ovf) sat <= 1'b1;
      end
      if (acc_en) begin
        acc_q <= sum_d;
        count <= count + 1'b1;
        if (add_ovf) sat <= 1'b1;
      end else if (bias_en) begin
        acc_q <= sum_d;
        done  <= (32'(count) == N_IN);
        if (add_ovf) sat <= 1'b1;
      end
    end
  end

  assign y = acc_q;

  // One step at a time, and no more products than inputs.
  assert property (@(posedge clk) disable iff (!rst_n)
    !(acc_en && bias_en));
  assert property (@(posedge clk) disable iff (!rst_n)
    acc_en |-> (32'(count) < N_IN));

endmodule
