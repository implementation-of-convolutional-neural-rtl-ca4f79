// nn_top: dense neural-network classifier for 28x28 images (MNIST digits).
//
// The network is N_IN inputs -> HID_LAYERS hidden layers of N_HID neurons ->
// N_OUT output neurons, all in 25-bit sign-magnitude fixed point (nn_pkg).
// Each layer is a neuron_layer: all of its neurons work in parallel, one
// input every three clocks, each neuron reading its weights from its own
// block RAM. A single activation_function unit is shared by all layers and
// handles one value per clock: ReLU after hidden layers, a sigmoid table after
// the output layer. response_check then reports the index of the largest
// activated output.
//
// Operation, one image at a time:
//   1. Load: with the network idle, write every weight and bias through
//      load_* (load_layer = layer 0..HID_LAYERS, load_neuron, load_addr =
//      input index or the layer's input count for the bias) and the sigmoid
//      table (load_layer = HID_LAYERS+1, load_addr = table index). Done once.
//   2. Stream the N_IN pixel values, already in fixed point, on
//      pix_valid/pix_ready. Layer 0 takes one every three clocks.
//   3. After each layer, its N outputs pass through the activation unit, one
//      per clock, into the buffer of active outputs, which then feeds the next
//      layer. The output layer's activated values go to response_check.
//   4. resp_valid pulses with resp_class / resp_score; pixels of the next
//      image are accepted from then on.
// With pixels always valid, resp_valid comes
//   3*N_IN + 2 + HID_LAYERS*(4*N_HID + 4) + N_OUT + 2
// clocks after the cycle the first pixel is taken (2550 clocks, 25.50 us at
// 100 MHz, for the default 784x45x10). overflow and clamped are sticky flags,
// cleared when the next image starts: some product or sum saturated, or an
// output-layer sum fell outside the sigmoid table's range.
//
// The block structure (layers, per-neuron weight RAMs, shared activation,
// response check), three clocks per multiply-accumulate, parallel neurons and
// the activation functions follow the design. The pixel and load interfaces,
// the sequencing controller, and equal widths for all hidden layers are this
// design's own.
module nn_top
  import nn_pkg::*;
#(
  parameter int unsigned N_IN       = 784,
  parameter int unsigned N_HID      = 45,
  parameter int unsigned N_OUT      = 10,
  parameter int unsigned HID_LAYERS = 1,
  localparam int unsigned NL        = HID_LAYERS + 1,            // layers
  localparam int unsigned MAXN      = (N_HID > N_OUT) ? N_HID : N_OUT,
  localparam int unsigned SIG_AB    = 12,
  localparam int unsigned IN_AW     = $clog2(N_IN + 1),
  localparam int unsigned LOAD_AW   = (IN_AW > SIG_AB) ? IN_AW : SIG_AB,
  localparam int unsigned CW        = (N_OUT > 1) ? $clog2(N_OUT) : 1,
  localparam int unsigned LW        = $clog2(NL),                  // layer index
  localparam int unsigned MW        = (MAXN > 1) ? $clog2(MAXN) : 1,  // neuron index
  localparam int unsigned HW        = (N_HID > 1) ? $clog2(N_HID) : 1 // buffer index
) (
  input  logic               clk,
  input  logic               rst_n,
  // weight / bias / sigmoid table loading
  input  logic               load_we,
  input  logic [3:0]         load_layer,
  input  logic [7:0]         load_neuron,
  input  logic [LOAD_AW-1:0] load_addr,
  input  fx_t                load_data,
  // pixel stream
  input  logic               pix_valid,
  output logic               pix_ready,
  input  fx_t                pix_data,
  // response
  output logic               busy,
  output logic               resp_valid,
  output logic [CW-1:0]      resp_class,
  output fx_t                resp_score,
  output logic               overflow,
  output logic               clamped
);

  typedef enum logic [2:0] {C_RUN, C_ACT, C_FLUSH, C_FEED, C_RESP} cstate_e;

  cstate_e           state;
  logic [LW-1:0]     cur;                 // layer being run
  logic [MW-1:0]     act_idx;             // activation position
  logic [HW-1:0]     feed_idx, wr_idx;    // buffer read / write position

  logic              lx_valid [NL];
  logic              lx_ready [NL];
  fx_t               lx_data  [NL];
  logic              ly_valid [NL];
  logic              ly_ack   [NL];
  logic              lsat     [NL];
  fx_t               ly       [NL][MAXN];

  fx_t               act_buf  [N_HID];    // active outputs of the last hidden layer
  logic              act_in_valid, act_out_valid, act_clamped;
  fx_t               act_in, act_out;
  act_mode_e         act_mode;
  logic              last_layer;
  logic [MW-1:0]     cur_n;               // neurons in the current layer

  assign last_layer = (32'(cur) == NL - 1);
  assign cur_n      = last_layer ? MW'(N_OUT) : MW'(N_HID);

  // ---------------------------------------------------------------- layers
  for (genvar l = 0; l < NL; l++) begin : g_layer
    localparam int unsigned LIN = (l == 0) ? N_IN : N_HID;
    localparam int unsigned LN  = (l == NL - 1) ? N_OUT : N_HID;
    localparam int unsigned LAW = $clog2(LIN + 1);

    fx_t yv [LN];

    neuron_layer #(.N_IN(LIN), .N_NEURONS(LN)) u_layer (
      .clk      (clk),
      .rst_n    (rst_n),
      .x_valid  (lx_valid[l]),
      .x_ready  (lx_ready[l]),
      .x_data   (lx_data[l]),
      .y_valid  (ly_valid[l]),
      .y_ack    (ly_ack[l]),
      .y        (yv),
      .sat      (lsat[l]),
      .wr_en    (load_we && (32'(load_layer) == l)),
      .wr_neuron(load_neuron),
      .wr_addr  (LAW'(load_addr)),
      .wr_data  (load_data)
    );

    for (genvar j = 0; j < MAXN; j++) begin : g_y
      if (j < LN) begin : g_used
        assign ly[l][j] = yv[j];
      end else begin : g_pad
        assign ly[l][j] = FX_ZERO;
      end
    end

    // Layer 0 reads the pixel stream, the others the active-output buffer.
    if (l == 0) begin : g_src_pix
      assign lx_valid[l] = pix_valid && (state == C_RUN) && (cur == '0);
      assign lx_data[l]  = pix_data;
    end else begin : g_src_buf
      assign lx_valid[l] = (state == C_FEED) && (32'(cur) == l);
      assign lx_data[l]  = act_buf[feed_idx];
    end
    assign ly_ack[l] = (state == C_ACT) && (32'(cur) == l) && (act_idx == cur_n - 1'b1);
  end

  assign pix_ready = lx_ready[0] && (state == C_RUN) && (cur == '0);

  // ------------------------------------------------------------ activation
  assign act_in_valid = (state == C_ACT);
  assign act_in       = ly[cur][act_idx];
  assign act_mode     = last_layer ? ACT_SIGMOID : ACT_RELU;

  activation_function #(.SIG_ADDR_BITS(SIG_AB), .SIG_SHIFT(2)) u_act (
    .clk      (clk),
    .rst_n    (rst_n),
    .mode     (act_mode),
    .in_valid (act_in_valid),
    .in_data  (act_in),
    .out_valid(act_out_valid),
    .out_data (act_out),
    .clamped  (act_clamped),
    .tbl_we   (load_we && (32'(load_layer) == NL)),
    .tbl_addr (SIG_AB'(load_addr)),
    .tbl_data (load_data)
  );

  // Hidden-layer results go to the buffer of active outputs.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_idx <= '0;
    end else if (act_out_valid && !last_layer) begin
      act_buf[wr_idx] <= act_out;
      wr_idx          <= (32'(wr_idx) == N_HID - 1) ? '0 : wr_idx + 1'b1;
    end
  end

  response_check #(.N_OUT(N_OUT)) u_resp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (act_out_valid && last_layer),
    .in_data   (act_out),
    .resp_valid(resp_valid),
    .resp_class(resp_class),
    .resp_score(resp_score)
  );

  // ------------------------------------------------------------ controller
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= C_RUN;
      cur      <= '0;
      act_idx  <= '0;
      feed_idx <= '0;
      busy     <= 1'b0;
      overflow <= 1'b0;
      clamped  <= 1'b0;
    end else begin
      if (pix_valid && pix_ready && !busy) begin
        busy     <= 1'b1;
        overflow <= 1'b0;
        clamped  <= 1'b0;
      end
      if (lsat[cur])   overflow <= 1'b1;
      if (act_clamped) clamped  <= 1'b1;
      unique case (state)
        C_RUN:   if (ly_valid[cur]) begin
                   act_idx <= '0;
                   state   <= C_ACT;
                 end
        C_ACT:   if (act_idx == cur_n - 1'b1) state <= C_FLUSH;
                 else act_idx <= act_idx + 1'b1;
        C_FLUSH: if (last_layer) state <= C_RESP;
                 else begin
                   cur      <= cur + 1'b1;
                   feed_idx <= '0;
                   state    <= C_FEED;
                 end
        C_FEED:  if (lx_ready[cur]) begin
                   if (32'(feed_idx) == N_HID - 1) state <= C_RUN;
                   else feed_idx <= feed_idx + 1'b1;
                 end
        C_RESP:  if (resp_valid) begin
                   cur   <= '0;
                   busy  <= 1'b0;
                   state <= C_RUN;
                 end
        default: state <= C_RUN;
      endcase
    end
  end

  // Pixels are only taken while layer 0 is running.
  assert property (@(posedge clk) disable iff (!rst_n)
    pix_ready |-> (state == C_RUN && cur == '0));
  // A pixel offered is not withdrawn before it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
    (pix_valid && !pix_ready) |=> pix_valid);

endmodule
