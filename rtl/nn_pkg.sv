// nn_pkg: number format and shared types of the dense-network accelerator.
//
// All values (pixels, weights, biases, sums, activated outputs) use one
// 25-bit sign-magnitude fixed-point format: one sign bit, 14 integer bits and
// 10 fraction bits, so a word represents (-1)^sign * mag / 2^10. The widths
// follow the fixed-point representation the design is built around; the
// choice of a packed struct and the helper constants are this design's own.
package nn_pkg;

  localparam int unsigned FX_INT  = 14;
  localparam int unsigned FX_FRAC = 10;
  localparam int unsigned FX_MAG  = FX_INT + FX_FRAC;   // 24 magnitude bits
  localparam int unsigned FX_W    = FX_MAG + 1;         // 25 bits in all

  typedef struct packed {
    logic              sign;  // 1 = negative
    logic [FX_MAG-1:0] mag;   // |value| * 2^FX_FRAC
  } fx_t;

  localparam fx_t FX_ZERO = '{sign: 1'b0, mag: '0};

  // Activation applied by the shared activation block.
  typedef enum logic {
    ACT_RELU    = 1'b0,   // hidden layers
    ACT_SIGMOID = 1'b1    // output layer, table lookup
  } act_mode_e;

endpackage
