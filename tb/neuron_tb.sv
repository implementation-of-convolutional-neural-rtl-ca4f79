// neuron_tb: drives one neuron (N_IN = 8) through complete sums.
//
// For each of many sums: clear, then per input the mul_en / acc_en strobes
// with random x and w, then bias_en with a random bias on w. The output must
// equal the reference sum (products truncated, each addition saturated, in
// input order, bias last), done must rise only after the bias step and sat
// must tell whether any step saturated. Some sums use large operands so that
// saturation happens.
module neuron_tb;
  import tb_ref_pkg::*;
  import nn_pkg::*;

  localparam int N = 8;

  logic clk = 0, rst_n = 0;
  logic clear = 0, mul_en = 0, acc_en = 0, bias_en = 0;
  fx_t  x, w, y;
  logic done, sat;
  int   checks = 0, failures = 0, n_sat = 0;

  neuron #(.N_IN(N)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .mul_en(mul_en), .acc_en(acc_en),
    .bias_en(bias_en), .x(x), .w(w), .y(y), .done(done), .sat(sat)
  );

  always #5 clk = ~clk;

  initial begin
    x = '0; w = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 300; s++) begin
      logic [24:0] acc, xi, wi, bias;
      bit          big, any_sat;
      big = (s % 5 == 4);
      acc = '0; any_sat = 0;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int i = 0; i < N; i++) begin
        xi = big ? rand_fx(1 << 24) : rand_fx(1024);
        wi = big ? rand_fx(1 << 16) : rand_fx(512);
        if (mul_ovf(xi, wi)) any_sat = 1;
        if (add_ovf(acc, ref_mul(xi, wi))) any_sat = 1;
        acc = ref_add(acc, ref_mul(xi, wi));
        x = xi; w = wi; mul_en = 1;
        @(negedge clk); mul_en = 0; x = rand_fx(1024); w = rand_fx(1024);
        acc_en = 1;
        @(negedge clk); acc_en = 0;
        checks++;
        if (done) begin failures++; $display("FAIL done before the bias"); end
      end
      bias = big ? rand_fx(1 << 24) : rand_fx(2048);
      if (add_ovf(acc, bias)) any_sat = 1;
      acc = ref_add(acc, bias);
      w = bias; bias_en = 1;
      @(negedge clk); bias_en = 0;
      checks++;
      if (y !== acc || done !== 1'b1 || sat !== any_sat) begin
        failures++;
        $display("FAIL sum %0d: y=%h done=%b sat=%b expected y=%h sat=%b",
                 s, y, done, sat, acc, any_sat);
      end
      if (sat) n_sat++;
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never seen"); end
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
