// neuron_layer_tb: a layer of 4 neurons over 16 inputs.
//
// Loads random weights and biases, then runs several input vectors. The
// first vector is offered without gaps: the layer must take one input every
// 3 clocks and raise y_valid exactly 3*N_IN + 2 clocks after taking the
// first input. Later vectors are offered with random gaps (stalls) and the
// outputs are acknowledged after a random wait; y_valid and y must hold until
// the acknowledge. Each output must equal the reference sum of products plus
// bias.
module neuron_layer_tb;
  import tb_ref_pkg::*;
  import nn_pkg::*;

  localparam int NI = 16;
  localparam int NN = 4;

  logic       clk = 0, rst_n = 0;
  logic       x_valid = 0, x_ready, y_valid, y_ack = 0, sat;
  fx_t        x_data, y [NN];
  logic       wr_en = 0;
  logic [7:0] wr_neuron;
  logic [4:0] wr_addr;
  fx_t        wr_data;
  logic [24:0] wm [NN][NI + 1];
  int          checks = 0, failures = 0, n_stall = 0, n_hold = 0;
  longint      cyc = 0;

  neuron_layer #(.N_IN(NI), .N_NEURONS(NN)) dut (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_ready(x_ready), .x_data(x_data),
    .y_valid(y_valid), .y_ack(y_ack), .y(y), .sat(sat),
    .wr_en(wr_en), .wr_neuron(wr_neuron), .wr_addr(wr_addr), .wr_data(wr_data)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    x_data = '0; wr_neuron = '0; wr_addr = '0; wr_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NN; n++)
      for (int i = 0; i <= NI; i++) begin
        wm[n][i] = (i == NI) ? rand_fx(4096) : rand_fx(1024);
        @(negedge clk);
        wr_en = 1; wr_neuron = 8'(n); wr_addr = 5'(i); wr_data = wm[n][i];
      end
    @(negedge clk);
    wr_en = 0;
    for (int v = 0; v < 20; v++) begin
      logic [24:0] xs [NI];
      logic [24:0] acc [NN];
      longint      t_first, t_done;
      for (int i = 0; i < NI; i++) xs[i] = rand_fx(2048);
      for (int n = 0; n < NN; n++) begin
        acc[n] = '0;
        for (int i = 0; i < NI; i++) acc[n] = ref_add(acc[n], ref_mul(xs[i], wm[n][i]));
        acc[n] = ref_add(acc[n], wm[n][NI]);
      end
      t_first = -1;
      for (int i = 0; i < NI; i++) begin
        if (v > 0) while ($urandom % 3 == 0) begin
          x_valid = 0; n_stall++;
          @(negedge clk);
        end
        x_valid = 1; x_data = xs[i];
        @(posedge clk);
        while (!x_ready) @(posedge clk);
        if (t_first < 0) t_first = cyc;
        @(negedge clk);
        x_valid = 0;
      end
      while (!y_valid) @(negedge clk);
      t_done = cyc;
      if (v == 0) begin
        checks++;
        if (t_done - t_first != 3 * NI + 2) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", t_done - t_first, 3 * NI + 2);
        end
      end
      repeat ($urandom % 4) begin
        @(negedge clk);
        n_hold++;
      end
      for (int n = 0; n < NN; n++) begin
        checks++;
        if (!y_valid || y[n] !== acc[n]) begin
          failures++;
          $display("FAIL vector %0d neuron %0d: y=%h valid=%b expected %h", v, n, y[n], y_valid, acc[n]);
        end
      end
      y_ack = 1;
      @(negedge clk);
      y_ack = 0;
      checks++;
      if (y_valid) begin failures++; $display("FAIL y_valid after ack"); end
    end
    checks++;
    if (n_stall == 0 || n_hold == 0) begin failures++; $display("FAIL no stall or hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
