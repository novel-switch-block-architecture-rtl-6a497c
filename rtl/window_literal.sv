// Window literal of a multi-context switch.
//
// A window literal is 1 for the contexts S with LO <= S <= HI and 0
// otherwise. It is the AND of an up-literal (S >= LO) and a down-literal
// (S <= HI). The down-literal on S equals the up-literal on S-bar = N-1-S with
// threshold N-1-HI, so both halves are the same kind of device: two FGFPs in
// series (a wired AND), one with S on its control gate and one with S-bar.
//
// Interface: the two thresholds are programmed together from one wl_cfg_t
// word (vth_up for the S device, vth_dn for the S-bar device). `on` follows
// s and s_bar combinationally. A window with either threshold at N_CTX is
// never on.
module window_literal
  import mcfpga_pkg::*;
(
  input  logic    clk,
  input  logic    prog_we,
  input  wl_cfg_t prog_cfg,
  input  ctx_t    s,       // context level V_S
  input  ctx_t    s_bar,   // complementary level, N_CTX-1-S
  output logic    on
);

  logic up_on, dn_on;

  fgfp u_up (
    .clk      (clk),
    .prog_we  (prog_we),
    .prog_vth (prog_cfg.vth_up),
    .level    (s),
    .on       (up_on)
  );

  fgfp u_dn (
    .clk      (clk),
    .prog_we  (prog_we),
    .prog_vth (prog_cfg.vth_dn),
    .level    (s_bar),
    .on       (dn_on)
  );

  // Series connection of the two pass-gates.
  always_comb on = up_on & dn_on;

endmodule
