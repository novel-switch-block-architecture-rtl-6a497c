// Multi-context logic block.
//
// The programmable logic block of one cell: a K-input look-up table with
// one truth table per context, followed by an optional flip-flop. The
// context ID s chooses which truth table (and which output mode) is in use,
// so the block becomes a different function in every context. Each
// context's configuration is an ordinary memory word: unlike the switch
// block, the look-up table needs little configuration memory, so it keeps
// one word per context.
//
// Interface: lb_in are the K inputs (input 0 is the least significant bit of
// the table index). The configuration of context prog_ctx is written with
// prog_we: bit LUT_BITS is the output mode (1 = registered) and bits
// LUT_BITS-1:0 the truth table. The flip-flop loads the current context's
// table output on every rising clock edge and resets to 0. lb_out is
// combinational in lb_in and s in combinational mode.
//
// In a cell the output can be routed back to the inputs through the switch
// block, so lint reports a combinational loop through lut_out; a
// configuration must break such a loop with the registered mode.
//
// Only the presence of a programmable logic block built around look-up
// tables comes from the published architecture; K, the flip-flop and the configuration
// layout are this design's choice.
module logic_block
  import mcfpga_pkg::*;
#(
  parameter int unsigned K = 4,
  localparam int unsigned LUT_BITS = 1 << K
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              prog_we,
  input  ctx_t              prog_ctx,
  input  logic [LUT_BITS:0] prog_data,  // {registered, truth table}
  input  ctx_t              s,
  input  logic [K-1:0]      lb_in,
  output logic              lb_out
);

  logic [N_CTX-1:0][LUT_BITS-1:0] lut;
  logic [N_CTX-1:0]               reg_mode;
  logic                           lut_out;
  logic                           q;

  always_ff @(posedge clk) begin
    if (prog_we) begin
      lut[prog_ctx]      <= prog_data[LUT_BITS-1:0];
      reg_mode[prog_ctx] <= prog_data[LUT_BITS];
    end
  end

  always_comb lut_out = lut[s][lb_in];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= lut_out;
  end

  always_comb lb_out = reg_mode[s] ? q : lut_out;

endmodule
