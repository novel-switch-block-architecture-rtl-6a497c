// Reconfigurable context memory (RCM) switch block.
//
// H horizontal tracks cross V vertical tracks. The switch block stores, for
// every crossing, whether the two tracks are joined in each of the N_CTX
// contexts, and it does so with FGFPs that are at the same time the memory
// and the pass transistors. It exploits the fact that almost every crossing
// is either on in all contexts or off in all contexts:
//
//  * Every crossing has one "small-square" FGFP whose control gate is tied
//    to the highest level. Programmed to VTH_ALWAYS it joins the tracks in
//    every context; programmed to VTH_NEVER it never does. This single
//    device serves all context-independent crossings.
//  * A crossing that changes with the context is routed through one of P
//    shared literal paths. A path is a window literal (an FGFP on S in
//    series with an FGFP on S-bar, conducting for LO <= S <= HI) with a
//    small-square entry FGFP from every horizontal track and a small-square
//    exit FGFP to every vertical track. Any on/off pattern over the
//    contexts is an OR of at most N_CTX/2 such windows, so a crossing uses
//    as many paths in parallel as its pattern has runs of "on" contexts:
//    the number of window literals per switch is set by configuration, not
//    fixed in the layout.
//
// Per vertical track, the wired OR of all conducting paths is modelled as
//   v_out[v] = OR_h (h_in[h] & cross[h][v])
//            | OR_p ((OR_h h_in[h] & entry[p][h]) & window[p] & exit[p][v]).
// Tracks are modelled with a direction: horizontal tracks are inputs,
// vertical tracks outputs, and an undriven vertical track reads 0. A path
// should be entered from one horizontal track only (more would short those
// tracks together in the device; here they are ORed, and an assertion
// reports it at the next clock edge).
//
// Programming: one FGFP (or one window-literal pair) per cycle. Address map:
//   h*V + v                       crossing FGFP, threshold in prog_data[VTH_W-1:0]
//   B + p*(H+V+1) + h             entry FGFP of path p from horizontal track h
//   B + p*(H+V+1) + H + v         exit FGFP of path p to vertical track v
//   B + p*(H+V+1) + H + V         window literal of path p, prog_data = wl_cfg_t
// with B = H*V. Routing is combinational in h_in, s and s_bar, so a context
// switch takes effect as soon as the levels change.
//
// The three kinds of FGFP and their roles (constant pass-gates between
// tracks, up-literals on S, down-literals as up-literals on S-bar) follow
// the published architecture. The exact network (entry and exit pass-gates
// on every track, P shared paths), the directed-track model and the address
// map are this design's own. With four tracks and two paths the block has
// 16 + 2*(4+4+2) = 36 FGFPs, against 64 for a separate four-FGFP switch at
// each crossing, in line with the roughly 60% quoted for this case.
module rcm
  import mcfpga_pkg::*;
#(
  parameter int unsigned H = 4,   // horizontal tracks (inputs)
  parameter int unsigned V = 4,   // vertical tracks (outputs)
  parameter int unsigned P = 2,   // shared literal paths
  localparam int unsigned STRIDE = H + V + 1,
  localparam int unsigned NADDR  = H * V + P * STRIDE,
  localparam int unsigned AW     = (NADDR > 1) ? $clog2(NADDR) : 1
) (
  input  logic              clk,
  input  logic              prog_we,
  input  logic [AW-1:0]     prog_addr,
  input  logic [RCM_DW-1:0] prog_data,
  input  ctx_t              s,
  input  ctx_t              s_bar,
  input  logic [H-1:0]      h_in,
  output logic [V-1:0]      v_out
);

  // Small-square FGFPs sit at the highest control level.
  localparam ctx_t LEVEL_TOP = ctx_t'(N_CTX - 1);

  logic [H-1:0][V-1:0] cross_on;
  logic [P-1:0][H-1:0] entry_on;
  logic [P-1:0][V-1:0] exit_on;
  logic [P-1:0]        win_on;
  vth_t                prog_vth;

  always_comb prog_vth = prog_data[VTH_W-1:0];

  for (genvar h = 0; h < H; h++) begin : g_h
    for (genvar v = 0; v < V; v++) begin : g_v
      fgfp u_cross (
        .clk      (clk),
        .prog_we  (prog_we && (prog_addr == AW'(h * V + v))),
        .prog_vth (prog_vth),
        .level    (LEVEL_TOP),
        .on       (cross_on[h][v])
      );
    end
  end

  for (genvar p = 0; p < P; p++) begin : g_p
    localparam int unsigned BASE = H * V + p * STRIDE;

    for (genvar h = 0; h < H; h++) begin : g_entry
      fgfp u_entry (
        .clk      (clk),
        .prog_we  (prog_we && (prog_addr == AW'(BASE + h))),
        .prog_vth (prog_vth),
        .level    (LEVEL_TOP),
        .on       (entry_on[p][h])
      );
    end

    for (genvar v = 0; v < V; v++) begin : g_exit
      fgfp u_exit (
        .clk      (clk),
        .prog_we  (prog_we && (prog_addr == AW'(BASE + H + v))),
        .prog_vth (prog_vth),
        .level    (LEVEL_TOP),
        .on       (exit_on[p][v])
      );
    end

    window_literal u_wl (
      .clk      (clk),
      .prog_we  (prog_we && (prog_addr == AW'(BASE + H + V))),
      .prog_cfg (prog_data),
      .s        (s),
      .s_bar    (s_bar),
      .on       (win_on[p])
    );
  end

  // Configuration rule: a literal path is entered from at most one
  // horizontal track; two open entries would short those tracks together.
  for (genvar p = 0; p < P; p++) begin : g_rule
    a_one_entry : assert property (@(posedge clk) $onehot0(entry_on[p]))
      else $error("rcm: literal path %0d entered from several horizontal tracks", p);
  end

  logic [P-1:0] path_out;

  always_comb begin
    for (int unsigned p = 0; p < P; p++)
      path_out[p] = (|(h_in & entry_on[p])) & win_on[p];
    v_out = '0;
    for (int unsigned v = 0; v < V; v++) begin
      for (int unsigned h = 0; h < H; h++)
        v_out[v] = v_out[v] | (h_in[h] & cross_on[h][v]);
      for (int unsigned p = 0; p < P; p++)
        v_out[v] = v_out[v] | (path_out[p] & exit_on[p][v]);
    end
  end

endmodule
