// fx_multiplier_tb: checks the sign-magnitude multiplier.
//
// First the worked example of the number format, 5.3125 * -3.375 =
// -17.9296875 (operands and result given as exact bit patterns), then
// random operands of several magnitude ranges, including products whose
// integer part overflows and must saturate, and zero products that must carry
// a + sign. Expected values come from tb_ref_pkg's integer arithmetic.
module fx_multiplier_tb;
  import tb_ref_pkg::*;

  logic [24:0] a, b, p;
  logic        ovf;
  int          checks = 0, failures = 0;
  int          n_ovf = 0;

  fx_multiplier #(.INT_BITS(14), .FRAC_BITS(10)) dut (.a(a), .b(b), .p(p), .ovf(ovf));

  task automatic check(string what);
    logic [24:0] exp_p;
    exp_p = ref_mul(a, b);
    checks++;
    if (p !== exp_p || ovf !== mul_ovf(a, b)) begin
      failures++;
      $display("FAIL %s: %h * %h -> %h ovf=%b, expected %h ovf=%b",
               what, a, b, p, ovf, exp_p, mul_ovf(a, b));
    end
    if (ovf) n_ovf++;
  endtask

  initial begin
    // 5.3125 = 0 0101.0101, -3.375 = 1 0011.0110 (10 fraction bits here)
    a = {1'b0, 14'd5, 10'b0101000000};
    b = {1'b1, 14'd3, 10'b0110000000};
    #1;
    checks++;
    if (p !== {1'b1, 14'd17, 10'b1110111000}) begin
      failures++;
      $display("FAIL example: got %h", p);
    end
    check("example");

    for (int i = 0; i < 20000; i++) begin
      unique case (i % 4)
        0: begin a = rand_fx(2048);     b = rand_fx(2048); end
        1: begin a = rand_fx(1 << 24);  b = rand_fx(1 << 12); end
        2: begin a = rand_fx(1 << 24);  b = rand_fx(1 << 24); end
        default: begin a = rand_fx(1024); b = {1'b1, 24'd0}; end  // -0 operand
      endcase
      #1;
      check("random");
    end
    checks++;
    if (n_ovf == 0) begin
      failures++;
      $display("FAIL no overflow case was exercised");
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
