// nn_top_full_tb: one complete classification at the design's full size.
//
// The classifier is used with its default parameters (784 inputs, one hidden
// layer of 45 neurons, 10 outputs). All 35,775 weights and biases and the
// 4096-entry sigmoid table are loaded, then three images of random pixel
// values are classified, the first offered back to back. Class, score and
// overflow flag are compared with the same integer reference model as in
// nn_top_tb, and the first image must take exactly
// 3*784 + 2 + (4*45 + 4) + 10 + 2 = 2550 clocks from the first pixel taken to
// resp_valid, with one pixel taken every 3 clocks.
module nn_top_full_tb;
  import tb_ref_pkg::*;
  import nn_pkg::*;

  localparam int NI = 784, NH = 45, NO = 10, HL = 1;
  localparam int NL = HL + 1;

  logic        clk = 0, rst_n = 0;
  logic        load_we = 0;
  logic [3:0]  load_layer;
  logic [7:0]  load_neuron;
  logic [11:0] load_addr;
  fx_t         load_data;
  logic        pix_valid = 0, pix_ready, busy, resp_valid, overflow, clamped;
  fx_t         pix_data, resp_score;
  logic [3:0]  resp_class;

  nn_top dut (
    .clk(clk), .rst_n(rst_n),
    .load_we(load_we), .load_layer(load_layer), .load_neuron(load_neuron),
    .load_addr(load_addr), .load_data(load_data),
    .pix_valid(pix_valid), .pix_ready(pix_ready), .pix_data(pix_data),
    .busy(busy), .resp_valid(resp_valid), .resp_class(resp_class),
    .resp_score(resp_score), .overflow(overflow), .clamped(clamped)
  );

  always #5 clk = ~clk;

  // weights: wt[l][n][i], i = layer input count is the bias
  logic [24:0] wt [NL][NO > NH ? NO : NH][NI + 1];
  logic [24:0] table_m [4096];
  int          checks = 0, failures = 0;
  int          n_stall = 0, n_backpressure = 0, n_relu_zero = 0, n_clamp = 0;
  int          n_overflow = 0, n_mode_switch = 0, n_handoff = 0, n_images = 0;

  // cycle bookkeeping
  longint cyc = 0, t_first = -1, t_resp = -1;
  int     n_taken = 0;
  longint t_taken [NI];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (pix_valid && pix_ready) begin
      if (n_taken == 0) t_first <= cyc;
      t_taken[n_taken] <= cyc;
      n_taken <= n_taken + 1;
    end
    if (pix_valid && !pix_ready) n_backpressure++;
    if (resp_valid) t_resp <= cyc;
  end

  function automatic int lin(int l);  return (l == 0) ? NI : NH; endfunction
  function automatic int lout(int l); return (l == NL - 1) ? NO : NH; endfunction

  task automatic load_word(int l, int n, int a, logic [24:0] d);
    @(negedge clk);
    load_we = 1; load_layer = 4'(l); load_neuron = 8'(n); load_addr = 12'(a); load_data = d;
  endtask

  // Reference network; returns class and score, counts mechanisms.
  task automatic reference(input logic [24:0] img [NI], output int cls,
                           output logic [24:0] score, output bit sat,
                           output bit clp);
    logic [24:0] a [NI];
    logic [24:0] u [NO > NH ? NO : NH];
    int          n_a;
    sat = 0;
    clp = 0;
    for (int i = 0; i < NI; i++) a[i] = img[i];
    n_a = NI;
    for (int l = 0; l < NL; l++) begin
      for (int n = 0; n < lout(l); n++) begin
        logic [24:0] acc, p;
        acc = '0;
        for (int i = 0; i < n_a; i++) begin
          if (mul_ovf(a[i], wt[l][n][i])) sat = 1;
          p = ref_mul(a[i], wt[l][n][i]);
          if (add_ovf(acc, p)) sat = 1;
          acc = ref_add(acc, p);
        end
        if (add_ovf(acc, wt[l][n][n_a])) sat = 1;
        u[n] = ref_add(acc, wt[l][n][n_a]);
      end
      for (int n = 0; n < lout(l); n++) begin
        if (l < NL - 1) begin
          if (fx2i(u[n]) < 0) begin n_relu_zero++; a[n] = '0; end
          else a[n] = u[n];
        end else begin
          if (sig_clamps(u[n])) begin n_clamp++; clp = 1; end
          a[n] = table_m[sig_index(u[n])];
        end
      end
      n_a = lout(l);
    end
    cls = 0;
    for (int n = 1; n < NO; n++) if (fx2i(a[n]) > fx2i(a[cls])) cls = n;
    score = a[cls];
  endtask

  initial begin
    load_layer = '0; load_neuron = '0; load_addr = '0; load_data = '0; pix_data = '0;
    for (int i = 0; i < 4096; i++) table_m[i] = sig_entry(i);
    for (int l = 0; l < NL; l++)
      for (int n = 0; n < lout(l); n++)
        for (int i = 0; i <= lin(l); i++)
          wt[l][n][i] = (l == NL - 1) ? rand_fx(3 * 1024) : rand_fx(200);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < NL; l++)
      for (int n = 0; n < lout(l); n++)
        for (int i = 0; i <= lin(l); i++) load_word(l, n, i, wt[l][n][i]);
    for (int i = 0; i < 4096; i++) load_word(NL, 0, i, table_m[i]);
    @(negedge clk);
    load_we = 0;

    for (int img_no = 0; img_no < 3; img_no++) begin
      logic [24:0] img [NI];
      int          cls;
      logic [24:0] score;
      bit          sat, clp;
      bit          big;
      big = 0;                       // this image overflows
      for (int i = 0; i < NI; i++) img[i] = big ? {1'b0, 24'hF00000} : {1'b0, 24'($urandom % 1024)};
      reference(img, cls, score, sat, clp);
      n_taken = 0;
      for (int i = 0; i < NI; i++) begin
        if (img_no > 0) while ($urandom % 4 == 0) begin
          pix_valid = 0; n_stall++;
          @(negedge clk);
        end
        pix_valid = 1; pix_data = img[i];
        @(posedge clk);
        while (!pix_ready) @(posedge clk);
        @(negedge clk);
        pix_valid = 0;
      end
      while (!resp_valid) @(negedge clk);
      @(negedge clk);
      n_images++;
      n_mode_switch++;                           // ReLU layers then sigmoid
      n_handoff += HL - 1;
      checks++;
      if (resp_class !== 4'(cls) || resp_score !== score || overflow !== sat || clamped !== clp) begin
        failures++;
        $display("FAIL image %0d: class %0d score %h overflow %b clamped %b, expected %0d %h %b %b",
                 img_no, resp_class, resp_score, overflow, clamped, cls, score, sat, clp);
      end
      if (overflow) n_overflow++;
      if (img_no == 0) begin
        longint expect_lat;
        expect_lat = 3 * NI + 2 + HL * (4 * NH + 4) + NO + 2;
        checks++;
        if (t_resp - t_first != expect_lat) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", t_resp - t_first, expect_lat);
        end
        for (int i = 1; i < NI; i++) begin
          checks++;
          if (t_taken[i] - t_taken[i-1] != 3) begin
            failures++;
            $display("FAIL pixel %0d taken %0d clocks after the previous one", i, t_taken[i] - t_taken[i-1]);
          end
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
