// One cell of the multi-context FPGA: a logic block and its RCM switch
// block.
//
// On each of its four sides (N, E, S, W) the cell receives SINGLE
// single-length lines from the adjacent cell and DOUBLE double-length lines
// from the cell two steps away, and drives the same number towards them.
// All of these arriving lines, plus the logic-block output, are the
// horizontal tracks of the RCM; all departing lines, plus the K
// logic-block inputs, are its vertical tracks. So any arriving line or the
// logic-block output can be routed, per context, to any departing line or
// logic-block input.
//
// Track numbering (used for programming):
//   horizontal h: side*(SINGLE+DOUBLE) + t   single line t of that side
//                 side*(SINGLE+DOUBLE) + SINGLE + j   double line j
//                 NDIR*(SINGLE+DOUBLE)                logic-block output
//   vertical   v: the same for the departing lines, then
//                 NDIR*(SINGLE+DOUBLE) + k            logic-block input k
// Programming address: below NRCM it is the RCM's own address (see rcm;
// data in prog_data[RCM_DW-1:0]); address NRCM + c programs context c of
// the logic block with prog_data[2**K:0].
//
// Because the logic-block output is a horizontal track and its inputs are
// vertical tracks, the netlist has a combinational path from lb_out back to
// lb_in through the crossbar. It is the nature of a programmable fabric:
// the path only closes if the configuration routes a combinational
// logic-block output to its own input, which a valid configuration avoids
// (or breaks with the registered output mode).
//
// The cell structure (a logic block joined to an RCM, RCMs joined by
// single- and double-length lines) follows the published architecture; the track counts
// and the numbering are this design's choice, as is the number of shared
// literal paths, sized from the observation that under 3% of the
// configuration changes between contexts.
module mcfpga_cell
  import mcfpga_pkg::*;
#(
  parameter int unsigned SINGLE = 2,
  parameter int unsigned DOUBLE = 1,
  parameter int unsigned K      = 4,
  // Shared literal paths of the RCM: enough for 3% of the crossings to
  // depend on the context.
  parameter int unsigned P      = ((NDIR * (SINGLE + DOUBLE) + 1) * (NDIR * (SINGLE + DOUBLE) + K) * 3 + 99) / 100,
  localparam int unsigned TR    = SINGLE + DOUBLE,
  localparam int unsigned H     = NDIR * TR + 1,
  localparam int unsigned V     = NDIR * TR + K,
  localparam int unsigned LUT_BITS = 1 << K,
  localparam int unsigned DW    = (RCM_DW > LUT_BITS + 1) ? RCM_DW : LUT_BITS + 1,
  localparam int unsigned NRCM  = H * V + P * (H + V + 1),
  localparam int unsigned AW    = $clog2(NRCM + N_CTX)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         prog_we,
  input  logic [AW-1:0]                prog_addr,
  input  logic [DW-1:0]                prog_data,
  input  ctx_t                         s,
  input  ctx_t                         s_bar,
  input  logic [NDIR-1:0][SINGLE-1:0]  in_s,
  input  logic [NDIR-1:0][DOUBLE-1:0]  in_d,
  output logic [NDIR-1:0][SINGLE-1:0]  out_s,
  output logic [NDIR-1:0][DOUBLE-1:0]  out_d
);

  localparam int unsigned RAW = $clog2(NRCM);

  logic [H-1:0] h_tr;
  logic [V-1:0] v_tr;
  logic         lb_out;
  logic         rcm_we, lb_we;

  always_comb begin
    rcm_we = prog_we && (32'(prog_addr) < NRCM);
    lb_we  = prog_we && (32'(prog_addr) >= NRCM);
  end

  // Arriving lines and the logic-block output onto the horizontal tracks;
  // vertical tracks onto departing lines.
  for (genvar d = 0; d < NDIR; d++) begin : g_side
    for (genvar t = 0; t < SINGLE; t++) begin : g_s
      assign h_tr[d * TR + t] = in_s[d][t];
      assign out_s[d][t]      = v_tr[d * TR + t];
    end
    for (genvar j = 0; j < DOUBLE; j++) begin : g_d
      assign h_tr[d * TR + SINGLE + j] = in_d[d][j];
      assign out_d[d][j]               = v_tr[d * TR + SINGLE + j];
    end
  end
  assign h_tr[NDIR * TR] = lb_out;

  rcm #(.H(H), .V(V), .P(P)) u_rcm (
    .clk       (clk),
    .prog_we   (rcm_we),
    .prog_addr (prog_addr[RAW-1:0]),
    .prog_data (prog_data[RCM_DW-1:0]),
    .s         (s),
    .s_bar     (s_bar),
    .h_in      (h_tr),
    .v_out     (v_tr)
  );

  ctx_t lb_ctx;
  always_comb lb_ctx = CTX_W'(prog_addr - AW'(NRCM));

  logic_block #(.K(K)) u_lb (
    .clk       (clk),
    .rst_n     (rst_n),
    .prog_we   (lb_we),
    .prog_ctx  (lb_ctx),
    .prog_data (prog_data[LUT_BITS:0]),
    .s         (s),
    .lb_in     (v_tr[V-1 -: K]),
    .lb_out    (lb_out)
  );

endmodule
