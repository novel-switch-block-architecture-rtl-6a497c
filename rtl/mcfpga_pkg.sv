// Shared constants and configuration types of the multi-context FPGA.
//
// The fabric holds N_CTX configuration contexts and switches between them
// with a context ID S in 0..N_CTX-1. Four contexts (a 2-bit ID, S1 S0) is the
// main configuration; context k is selected by S = k. In the device the ID is
// a multi-valued control-gate level; here it is carried as a binary number,
// together with its complement S-bar = N_CTX-1-S.
//
// All configuration is held by floating-gate functional pass-gates (FGFPs).
// Each FGFP stores one threshold VTH (0..N_CTX) and conducts when its
// control level is >= VTH; VTH_NEVER (= N_CTX, above the largest level) is
// the "never conducts" state and VTH_ALWAYS (= 0) conducts at every level.
// A window literal is a series pair of FGFPs, one on S and one on S-bar,
// programmed together with one wl_cfg_t word.
package mcfpga_pkg;

  // Number of contexts (four in the main configuration).
  localparam int unsigned N_CTX = 4;
  // Width of the context ID.
  localparam int unsigned CTX_W = $clog2(N_CTX);
  // Width of a stored FGFP threshold: 0..N_CTX.
  localparam int unsigned VTH_W = $clog2(N_CTX + 1);

  localparam logic [VTH_W-1:0] VTH_ALWAYS = '0;
  localparam logic [VTH_W-1:0] VTH_NEVER  = VTH_W'(N_CTX);

  typedef logic [CTX_W-1:0] ctx_t;
  typedef logic [VTH_W-1:0] vth_t;

  // One window literal: threshold of the FGFP driven by S (up-literal) and
  // of the FGFP driven by S-bar (which realises the down-literal).
  typedef struct packed {
    vth_t vth_up;
    vth_t vth_dn;
  } wl_cfg_t;

  // Width of the switch-block programming data: one window literal, or one
  // single FGFP threshold in the low VTH_W bits.
  localparam int unsigned RCM_DW = $bits(wl_cfg_t);

  // Sides of a cell. A cell's output on side d travels to the neighbour on
  // side d; its input on side d comes from that neighbour.
  localparam int unsigned NDIR = 4;
  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3} dir_e;

endpackage
