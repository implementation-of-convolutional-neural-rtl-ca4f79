// activation_function_tb: loads the sigmoid table (entry i =
// sigmoid((i - 2048) / 256), computed here), then sends a random stream of
// values, each in a random mode, one per clock with occasional idle cycles.
// Every output must appear exactly one clock after its input: ReLU values
// must equal max(u, 0) and sigmoid values the table entry at 2048 + u/4
// (clamped). Values beyond the table range must raise clamped. Both modes,
// negative ReLU inputs and clamping must all occur.
module activation_function_tb;
  import tb_ref_pkg::*;
  import nn_pkg::*;

  logic        clk = 0, rst_n = 0;
  act_mode_e   mode;
  logic        in_valid = 0, out_valid, clamped;
  fx_t         in_data, out_data;
  logic        tbl_we = 0;
  logic [11:0] tbl_addr;
  fx_t         tbl_data;
  logic [24:0] table_m [4096];
  int          checks = 0, failures = 0;
  int          n_relu_neg = 0, n_sig = 0, n_clamp = 0;

  activation_function #(.SIG_ADDR_BITS(12), .SIG_SHIFT(2)) dut (
    .clk(clk), .rst_n(rst_n), .mode(mode), .in_valid(in_valid), .in_data(in_data),
    .out_valid(out_valid), .out_data(out_data), .clamped(clamped),
    .tbl_we(tbl_we), .tbl_addr(tbl_addr), .tbl_data(tbl_data)
  );

  always #5 clk = ~clk;

  // expected outputs, one clock behind the inputs
  logic        exp_valid = 0, exp_clamp = 0;
  logic [24:0] exp_data = '0;

  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      checks++;
      if (out_valid !== exp_valid || (exp_valid && (out_data !== exp_data || clamped !== exp_clamp))) begin
        failures++;
        $display("FAIL valid=%b data=%h clamped=%b expected %b %h %b",
                 out_valid, out_data, clamped, exp_valid, exp_data, exp_clamp);
      end
    end
  end

  initial begin
    mode = ACT_RELU; in_data = '0; tbl_addr = '0; tbl_data = '0;
    for (int i = 0; i < 4096; i++) table_m[i] = sig_entry(i);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      tbl_we = 1; tbl_addr = 12'(i); tbl_data = table_m[i];
    end
    @(negedge clk);
    tbl_we = 0;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      in_valid = ($urandom % 8 != 0);
      mode     = ($urandom % 2 == 1) ? ACT_SIGMOID : ACT_RELU;
      in_data  = (k % 3 == 0) ? rand_fx(1 << 24) : rand_fx(12 * 1024);
      // the expectation for this input, checked after the next edge
      @(posedge clk);
      exp_valid = in_valid;
      if (mode == ACT_RELU) begin
        exp_data  = (fx2i(in_data) < 0) ? 25'd0 : in_data;
        exp_clamp = 0;
        if (in_valid && fx2i(in_data) < 0) n_relu_neg++;
      end else begin
        exp_data  = table_m[sig_index(in_data)];
        exp_clamp = sig_clamps(in_data);
        if (in_valid) n_sig++;
        if (in_valid && exp_clamp) n_clamp++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    @(posedge clk); exp_valid = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (n_relu_neg == 0 || n_sig == 0 || n_clamp == 0) begin
      failures++;
      $display("FAIL coverage: relu_neg=%0d sigmoid=%0d clamp=%0d", n_relu_neg, n_sig, n_clamp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
