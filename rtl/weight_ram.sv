// weight_ram: per-neuron block RAM for synaptic weights.
//
// A simple dual-port memory: one synchronous write port, used once to load the
// weights from outside before the network runs, and one read port with a
// registered output, so rdata shows word raddr one clock after raddr is
// presented. Word i holds the weight of input i; this design also keeps the
// neuron's bias in the word after the last weight. Written as a plain array
// so that synthesis maps it to block RAM. Contents are not reset.
//
// One memory per neuron, loaded from an external source and supplying one
// weight per clock, follows the design; the port arrangement and the place of
// the bias are this design's own.
module weight_ram #(
  parameter int unsigned DEPTH = 785,
  parameter int unsigned WIDTH = 25,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end

endmodule
