// response_check: picks the network's answer from the last layer's outputs.
//
// The activated outputs of the output layer arrive one per clock (in_valid),
// in neuron order 0..N_OUT-1. A running maximum is kept; a later value
// replaces it only if strictly larger, so on a tie the lower index wins.
// Values are compared as signed sign-magnitude numbers. One clock after the
// N_OUT-th value, resp_valid pulses for one cycle with the index of the
// largest value on resp_class and the value itself on resp_score; both hold
// until the next result.
//
// Comparing the activated outputs and reporting the most likely answer
// follows the design; the serial search and the tie rule are this design's
// own.
module response_check
  import nn_pkg::*;
#(
  parameter int unsigned N_OUT = 10,
  localparam int unsigned CW = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  fx_t           in_data,
  output logic          resp_valid,
  output logic [CW-1:0] resp_class,
  output fx_t           resp_score
);

  logic [CW-1:0] cnt;          // index of the incoming value
  logic [CW-1:0] best_idx;
  fx_t           best;
  logic          greater;

  // Signed comparison of two sign-magnitude numbers (+0 and -0 equal).
  function automatic logic fx_gt(fx_t a, fx_t b);
    logic a_neg, b_neg;
    a_neg = a.sign && (a.mag != '0);
    b_neg = b.sign && (b.mag != '0);
    if (a_neg != b_neg) return b_neg;
    if (!a_neg)         return a.mag > b.mag;
    return a.mag < b.mag;
  endfunction

  assign greater = (cnt == '0) || fx_gt(in_data, best);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt        <= '0;
      best_idx   <= '0;
      best       <= FX_ZERO;
      resp_valid <= 1'b0;
      resp_class <= '0;
      resp_score <= FX_ZERO;
    end else begin
      resp_valid <= 1'b0;
      if (in_valid) begin
        if (greater) begin
          best     <= in_data;
          best_idx <= cnt;
        end
        if (32'(cnt) == N_OUT - 1) begin
          cnt        <= '0;
          resp_valid <= 1'b1;
          resp_class <= greater ? cnt : best_idx;
          resp_score <= greater ? in_data : best;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
