// fx_adder_tb: checks the sign-magnitude adder.
//
// Random operands over small and full ranges, equal magnitudes of opposite
// sign (the result must be +0), and large operands whose sum saturates.
// Expected values come from tb_ref_pkg's integer arithmetic.
module fx_adder_tb;
  import tb_ref_pkg::*;

  logic [24:0] a, b, s;
  logic        ovf;
  int          checks = 0, failures = 0;
  int          n_ovf = 0, n_zero = 0;

  fx_adder #(.INT_BITS(14), .FRAC_BITS(10)) dut (.a(a), .b(b), .s(s), .ovf(ovf));

  initial begin
    for (int i = 0; i < 20000; i++) begin
      unique case (i % 4)
        0: begin a = rand_fx(4096);    b = rand_fx(4096); end
        1: begin a = rand_fx(1 << 24); b = rand_fx(1 << 24); end
        2: begin a = rand_fx(1 << 24); b = {~a[24], a[23:0]}; end
        default: begin a = {1'b0, 24'hFFFFFF - 24'($urandom % 100)};
                       b = {1'b0, 24'($urandom % 1000)}; end
      endcase
      #1;
      checks++;
      if (s !== ref_add(a, b) || ovf !== add_ovf(a, b)) begin
        failures++;
        $display("FAIL %h + %h -> %h ovf=%b, expected %h", a, b, s, ovf, ref_add(a, b));
      end
      if (ovf) n_ovf++;
      if (s == '0) n_zero++;
    end
    checks++;
    if (n_ovf == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL overflow (%0d) or zero (%0d) never exercised", n_ovf, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
