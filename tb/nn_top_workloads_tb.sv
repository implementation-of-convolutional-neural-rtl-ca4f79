// nn_top_workloads_tb: the six network shapes of the resource / timing
// tables, each classifying two random 28x28 images.
//
//   784x10x10, 784x15x10, 784x30x10, 784x45x10, 784x100x10 (one hidden layer)
//   784x10x10x10 (two hidden layers)
//
// Each shape runs in its own nn_top_harness (own clock, own classifier
// instance), which checks results against the integer reference model and
// the latency against 3*784 + 2 + HL*(4*NH + 4) + 10 + 2 clocks. The measured
// response times at 100 MHz are printed next to the times reported for the
// original implementation (23.77, 23.97, 24.57, 25.17, 27.37 and 47.85 us);
// those are for information only and not checked.
module nn_top_workloads_tb;

  localparam int NW = 6;
  localparam real PAPER_US [NW] = '{23.77, 23.97, 24.57, 25.17, 27.37, 47.85};
  localparam string NAME [NW] = '{"784x10x10", "784x15x10", "784x30x10",
                                  "784x45x10", "784x100x10", "784x10x10x10"};

  bit     done [NW];
  int     c [NW], f [NW];
  longint lat [NW];
  int     checks, failures;

  nn_top_harness #(.NI(784), .NH(10),  .NO(10), .HL(1), .NIMG(2)) w0 (done[0], c[0], f[0], lat[0]);
  nn_top_harness #(.NI(784), .NH(15),  .NO(10), .HL(1), .NIMG(2)) w1 (done[1], c[1], f[1], lat[1]);
  nn_top_harness #(.NI(784), .NH(30),  .NO(10), .HL(1), .NIMG(2)) w2 (done[2], c[2], f[2], lat[2]);
  nn_top_harness #(.NI(784), .NH(45),  .NO(10), .HL(1), .NIMG(2)) w3 (done[3], c[3], f[3], lat[3]);
  nn_top_harness #(.NI(784), .NH(100), .NO(10), .HL(1), .NIMG(2)) w4 (done[4], c[4], f[4], lat[4]);
  nn_top_harness #(.NI(784), .NH(10),  .NO(10), .HL(2), .NIMG(2)) w5 (done[5], c[5], f[5], lat[5]);

  function automatic bit all_done();
    foreach (done[i]) if (!done[i]) return 0;
    return 1;
  endfunction

  initial begin
    checks = 0; failures = 0;
    while (!all_done()) #1us;
    for (int i = 0; i < NW; i++) begin
      $display("%-13s clocks=%0d  %0.2f us at 100 MHz (reported %0.2f us)  checks=%0d failures=%0d",
               NAME[i], lat[i], real'(lat[i]) / 100.0, PAPER_US[i], c[i], f[i]);
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
