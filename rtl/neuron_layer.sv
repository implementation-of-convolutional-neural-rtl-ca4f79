// neuron_layer: a fully connected layer of N_NEURONS neurons over N_IN inputs.
//
// Every input value is handed to all neurons at once, together with the
// weight each neuron's own block RAM holds for that input index, so all
// neurons of the layer work in parallel and the layer time depends on N_IN,
// not on N_NEURONS. One input takes three clocks:
//   S_IN  : x_ready is high; on x_valid the value is latched and every RAM is
//           read at the current input index
//   S_MUL : each neuron registers x * w
//   S_ACC : each neuron adds the product to its sum
// After the last input two more clocks read and add the bias (RAM word N_IN).
// The layer then sits in S_DONE with y_valid high and the sums on y until
// y_ack, which clears the neurons for the next image.
//
// Weight loading: wr_en writes wr_data into word wr_addr of the RAM of neuron
// wr_neuron (word N_IN is the bias). Meant to be used while the layer is idle.
//
// One RAM per neuron feeding it one weight per clock, the three clocks per
// multiply-accumulate, and inputs broadcast to all neurons follow the design.
// The valid/ready input, the hold-until-ack output, the bias in the RAM and
// the exact split of the three clocks are this design's own.
module neuron_layer
  import nn_pkg::*;
#(
  parameter int unsigned N_IN      = 784,
  parameter int unsigned N_NEURONS = 45,
  localparam int unsigned AW = $clog2(N_IN + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  // input values, one at a time
  input  logic       x_valid,
  output logic       x_ready,
  input  fx_t        x_data,
  // accumulated outputs, held until acknowledged
  output logic       y_valid,
  input  logic       y_ack,
  output fx_t        y [N_NEURONS],
  output logic       sat,
  // weight load port
  input  logic       wr_en,
  input  logic [7:0] wr_neuron,
  input  logic [AW-1:0] wr_addr,
  input  fx_t        wr_data
);

  typedef enum logic [2:0] {S_IN, S_MUL, S_ACC, S_BRD, S_BADD, S_DONE} state_e;

  state_e           state;
  logic [AW-1:0]    idx;        // index of the current input
  logic [AW-1:0]    raddr;
  fx_t              x_q;
  fx_t              w   [N_NEURONS];
  logic             ndone [N_NEURONS];
  logic             nsat  [N_NEURONS];
  logic             clear;

  assign x_ready = (state == S_IN);
  assign y_valid = (state == S_DONE);
  assign clear   = (state == S_DONE) && y_ack;
  assign raddr   = (state == S_BRD) ? AW'(N_IN) : idx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IN;
      idx   <= '0;
      x_q   <= FX_ZERO;
    end else begin
      unique case (state)
        S_IN:   if (x_valid) begin
                  x_q   <= x_data;
                  state <= S_MUL;
                end
        S_MUL:  state <= S_ACC;
        S_ACC:  if (32'(idx) == N_IN - 1) state <= S_BRD;
                else begin
                  idx   <= idx + 1'b1;
                  state <= S_IN;
                end
        S_BRD:  state <= S_BADD;
        S_BADD: state <= S_DONE;
        S_DONE: if (y_ack) begin
                  idx   <= '0;
                  state <= S_IN;
                end
        default: state <= S_IN;
      endcase
    end
  end

  for (genvar n = 0; n < N_NEURONS; n++) begin : g_neuron
    weight_ram #(.DEPTH(N_IN + 1), .WIDTH(FX_W)) u_ram (
      .clk  (clk),
      .we   (wr_en && (32'(wr_neuron) == n)),
      .waddr(wr_addr),
      .wdata(wr_data),
      .raddr(raddr),
      .rdata(w[n])
    );

    neuron #(.N_IN(N_IN)) u_neuron (
      .clk    (clk),
      .rst_n  (rst_n),
      .clear  (clear),
      .mul_en (state == S_MUL),
      .acc_en (state == S_ACC),
      .bias_en(state == S_BADD),
      .x      (x_q),
      .w      (w[n]),
      .y      (y[n]),
      .done   (ndone[n]),
      .sat    (nsat[n])
    );
  end

  always_comb begin
    sat = 1'b0;
    for (int n = 0; n < N_NEURONS; n++) sat |= nsat[n];
  end

  // Every neuron has counted all N_IN products when the layer reports done.
  for (genvar n = 0; n < N_NEURONS; n++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      (state == S_DONE) |-> ndone[n]);
  end

endmodule
