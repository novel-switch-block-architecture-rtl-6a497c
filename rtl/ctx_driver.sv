// Context-ID driver.
//
// Holds the current context ID S and drives the two global control levels
// of the fabric: S itself (V_S, for the up-literal FGFPs) and its
// complement S-bar = N_CTX-1-S (for the FGFPs that realise down-literals).
// With four contexts S is the two bits S1 S0 and context k has S = k.
//
// Interface: when ctx_load is high at a rising clock edge, ctx_next becomes
// the current context and the levels change after that edge, so a context
// switch takes one clock cycle and every switch of the fabric follows it at
// once. Reset selects context 0. A request beyond N_CTX-1 (possible only
// when N_CTX is not a power of two) is ignored.
//
// The levels and their complement follow the published architecture; the load/reset
// handshake is this design's choice.
module ctx_driver
  import mcfpga_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic ctx_load,
  input  ctx_t ctx_next,
  output ctx_t s,
  output ctx_t s_bar
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   s <= '0;
    else if (ctx_load && (32'(ctx_next) < N_CTX)) s <= ctx_next;
  end

  always_comb s_bar = ctx_t'(N_CTX - 1) - s;

endmodule
