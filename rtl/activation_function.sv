// activation_function: shared activation unit, one value per clock.
//
// Two functions, selected per value by mode:
//   ACT_RELU    : y = u for u >= 0, else +0 (used after hidden layers)
//   ACT_SIGMOID : y = table[i] (used after the output layer), where the table
//                 sits in a block RAM written from outside through tbl_*
//                 and i = 2^(SIG_ADDR_BITS-1) + u * 2^(FRAC-SIG_SHIFT),
//                 i.e. u in steps of 2^-(FX_FRAC-SIG_SHIFT), truncated toward
//                 zero and clamped to the table. With the defaults the table
//                 has 4096 entries covering u in [-8, 8) in steps of 1/256,
//                 and entry i should hold sigmoid((i - 2048) / 256).
// Both paths have one clock of latency: out_valid/out_data follow
// in_valid/in_data by one cycle. clamped marks a sigmoid input outside the
// table range, where the end entry is used.
//
// Computing the function ahead of time and looking it up from block RAM in a
// single clock per value, and a single unit shared by all layers, follow the
// design. Table size, range, indexing and the ReLU encoding are this
// design's own choices.
module activation_function
  import nn_pkg::*;
#(
  parameter int unsigned SIG_ADDR_BITS = 12,
  parameter int unsigned SIG_SHIFT     = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  act_mode_e                mode,
  input  logic                     in_valid,
  input  fx_t                      in_data,
  output logic                     out_valid,
  output fx_t                      out_data,
  output logic                     clamped,
  // sigmoid table load port
  input  logic                     tbl_we,
  input  logic [SIG_ADDR_BITS-1:0] tbl_addr,
  input  fx_t                      tbl_data
);

  localparam int unsigned DEPTH = 1 << SIG_ADDR_BITS;
  localparam int unsigned HALF  = DEPTH / 2;

  logic [FX_MAG-1:0]        step;      // |u| in table steps
  logic                     out_of_range;
  logic [SIG_ADDR_BITS-1:0] tidx;
  fx_t                      tbl_q, relu_q;
  act_mode_e                mode_q;

  always_comb begin
    step         = in_data.mag >> SIG_SHIFT;
    out_of_range = in_data.sign ? (step > FX_MAG'(HALF)) : (step > FX_MAG'(HALF - 1));
    if (in_data.sign)
      tidx = out_of_range ? '0 : SIG_ADDR_BITS'(HALF - 32'(step));
    else
      tidx = out_of_range ? '1 : SIG_ADDR_BITS'(HALF + 32'(step));
  end

  weight_ram #(.DEPTH(DEPTH), .WIDTH(FX_W)) u_table (
    .clk  (clk),
    .we   (tbl_we),
    .waddr(tbl_addr),
    .wdata(tbl_data),
    .raddr(tidx),
    .rdata(tbl_q)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      clamped   <= 1'b0;
      mode_q    <= ACT_RELU;
      relu_q    <= FX_ZERO;
    end else begin
      out_valid <= in_valid;
      mode_q    <= mode;
      clamped   <= in_valid && (mode == ACT_SIGMOID) && out_of_range;
      relu_q    <= in_data.sign ? FX_ZERO : in_data;
    end
  end

  assign out_data = (mode_q == ACT_SIGMOID) ? tbl_q : relu_q;

endmodule
