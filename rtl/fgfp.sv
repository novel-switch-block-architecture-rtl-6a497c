// Floating-gate functional pass-gate (FGFP), digital equivalent.
//
// An FGFP is one floating-gate MOS transistor used both as the storage of a
// configuration value and as the pass transistor of a switch. Its threshold
// is set by programming charge onto the floating gate; when the multi-valued
// level on its control gate reaches that threshold the transistor conducts.
// It therefore computes the up-literal  on = (level >= vth)  and holds vth
// without power.
//
// Here the threshold is a register written through the programming port
// (prog_we, prog_vth) on a rising clock edge, and it has no reset: like the
// floating gate it keeps whatever was last programmed. vth = 0 conducts for
// every level, vth = N_CTX never conducts. Before its first programming the
// device is in the erased state and never conducts. `on` is combinational in `level`,
// so a new context level takes effect in the same cycle.
//
// The up-literal behaviour follows the device description; modelling the
// charge as a register, the programming as a synchronous write and the
// erased state as "never conducts" are this design's choices. The erased
// state is the register's declared initial value and the programming write
// then overrides it; lint notes this mix of initial value and procedural
// write, which is intended.
module fgfp
  import mcfpga_pkg::*;
(
  input  logic clk,
  input  logic prog_we,   // program the threshold this cycle
  input  vth_t prog_vth,  // threshold to program, 0..N_CTX
  input  ctx_t level,     // control-gate level (S or S-bar)
  output logic on         // the pass-gate conducts
);

  // Erased state, before any programming: the pass-gate never conducts, so
  // an unconfigured fabric has every switch open.
  vth_t vth = VTH_NEVER;

  always_ff @(posedge clk) begin
    if (prog_we) vth <= prog_vth;
  end

  always_comb on = (VTH_W'(level) >= vth);

endmodule
