// weight_ram_tb: fills the RAM with random words, then reads every address
// back in random order and checks that each word appears exactly one clock
// after its address, also while writes to other addresses go on.
module weight_ram_tb;
  localparam int DEPTH = 785;

  logic        clk = 0;
  logic        we;
  logic [9:0]  waddr, raddr;
  logic [24:0] wdata, rdata;
  logic [24:0] model [DEPTH];
  int          checks = 0, failures = 0;

  weight_ram #(.DEPTH(DEPTH), .WIDTH(25)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata)
  );

  always #5 clk = ~clk;

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 10'(i); wdata = 25'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int k = 0; k < 3000; k++) begin
      int a;
      logic [24:0] expv;
      a = $urandom % DEPTH;
      raddr = 10'(a);
      expv  = model[a];
      // a write to a different address in the same cycle
      we    = (k % 3 == 0);
      waddr = 10'((a + 1 + $urandom % (DEPTH - 1)) % DEPTH);
      wdata = 25'($urandom);
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expv) begin
        failures++;
        $display("FAIL addr %0d: got %h expected %h", a, rdata, expv);
      end
      @(negedge clk);
    end
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
