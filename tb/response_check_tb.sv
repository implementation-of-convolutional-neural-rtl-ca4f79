// response_check_tb: streams groups of N_OUT = 10 values and checks that the
// reported class is the index of the largest value (lowest index on a tie),
// that the score is that value, and that resp_valid comes exactly one clock
// after the tenth value. Groups mix positive and negative values, include
// ties, and sometimes have idle cycles between values.
module response_check_tb;
  import tb_ref_pkg::*;
  import nn_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       in_valid = 0;
  fx_t        in_data;
  logic       resp_valid;
  logic [3:0] resp_class;
  fx_t        resp_score;
  int         checks = 0, failures = 0, n_tie = 0;

  response_check #(.N_OUT(10)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
    .resp_valid(resp_valid), .resp_class(resp_class), .resp_score(resp_score)
  );

  always #5 clk = ~clk;

  initial begin
    in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 500; g++) begin
      logic [24:0] v [10];
      int          best;
      for (int i = 0; i < 10; i++) v[i] = (g % 3 == 0) ? rand_fx(8) : rand_fx(1 << 20);
      if (g % 7 == 0) v[$urandom % 10] = {1'b1, 24'd0};     // a -0
      best = 0;
      for (int i = 1; i < 10; i++) if (fx2i(v[i]) > fx2i(v[best])) best = i;
      for (int i = 0; i < 10; i++)
        if (i != best && fx2i(v[i]) == fx2i(v[best])) begin n_tie++; break; end
      for (int i = 0; i < 10; i++) begin
        @(negedge clk);
        checks++;
        if (resp_valid) begin failures++; $display("FAIL early resp_valid"); end
        if (g % 4 == 1 && $urandom % 2 == 1) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1; in_data = v[i];
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!resp_valid || resp_class !== 4'(best) || resp_score !== v[best]) begin
        failures++;
        $display("FAIL group %0d: valid=%b class=%0d score=%h expected %0d %h",
                 g, resp_valid, resp_class, resp_score, best, v[best]);
      end
    end
    checks++;
    if (n_tie == 0) begin failures++; $display("FAIL no tie exercised"); end
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
