// Multi-context FPGA: an array of cells whose switch blocks are RCMs.
//
// ROWS x COLS cells, each a logic block joined to an RCM switch block
// (mcfpga_cell). Neighbouring RCMs are joined by SINGLE single-length lines
// per side and direction, which give flexible routing, and every RCM is
// joined to the RCM two cells away by DOUBLE double-length lines, which
// carry a signal over a distance through fewer switch blocks. One context
// driver (ctx_driver) holds the context ID and drives S and S-bar to every
// FGFP of the array, so a single load switches the whole fabric to another
// of its N_CTX configurations in one clock cycle.
//
// Edges: the lines that would come from or go to a cell outside the array
// are brought out. edge_in[side][pos] and edge_out[side][pos] (side N, E,
// S, W; pos = column on N/S, row on E/W) each hold EW bits: the SINGLE
// single-length lines of the edge cell, then the DOUBLE double-length lines
// of the edge cell, then the DOUBLE double-length lines of the cell one step
// inside. Row 0 is the north row, column 0 the west column. For a non-square
// array the positions beyond the side's length are unused.
//
// Programming: with prog_we high, prog_cell (row*COLS + col) selects a
// cell and prog_addr/prog_data are that cell's programming port (see
// mcfpga_cell). The configuration is non-volatile: reset does not clear it.
//
// Timing: the routing is combinational from edge_in through any number of
// RCMs to edge_out; logic blocks in registered mode add one cycle each.
// The array is a programmable fabric, so its netlist contains
// combinational loops through the crossbars (a signal may be routed out of
// a cell and back into it); a configuration must not close one without a
// registered logic block in it.
//
// The array of logic blocks and RCMs and the two line lengths follow the
// published architecture; the array size, line counts, edge I/O and programming port are
// this design's choices.
module mcfpga_top
  import mcfpga_pkg::*;
#(
  parameter int unsigned ROWS   = 4,
  parameter int unsigned COLS   = 4,
  parameter int unsigned SINGLE = 2,
  parameter int unsigned DOUBLE = 1,
  parameter int unsigned K      = 4,
  parameter int unsigned P      = ((NDIR * (SINGLE + DOUBLE) + 1) * (NDIR * (SINGLE + DOUBLE) + K) * 3 + 99) / 100,
  localparam int unsigned TR    = SINGLE + DOUBLE,
  localparam int unsigned H     = NDIR * TR + 1,
  localparam int unsigned V     = NDIR * TR + K,
  localparam int unsigned LUT_BITS = 1 << K,
  localparam int unsigned DW    = (RCM_DW > LUT_BITS + 1) ? RCM_DW : LUT_BITS + 1,
  localparam int unsigned NRCM  = H * V + P * (H + V + 1),
  localparam int unsigned AW    = $clog2(NRCM + N_CTX),
  localparam int unsigned CW    = (ROWS * COLS > 1) ? $clog2(ROWS * COLS) : 1,
  localparam int unsigned MAXP  = (ROWS > COLS) ? ROWS : COLS,
  localparam int unsigned EW    = SINGLE + 2 * DOUBLE
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // context switching
  input  logic                              ctx_load,
  input  ctx_t                              ctx_next,
  output ctx_t                              ctx,
  // programming
  input  logic                              prog_we,
  input  logic [CW-1:0]                     prog_cell,
  input  logic [AW-1:0]                     prog_addr,
  input  logic [DW-1:0]                     prog_data,
  // array edges
  input  logic [NDIR-1:0][MAXP-1:0][EW-1:0] edge_in,
  output logic [NDIR-1:0][MAXP-1:0][EW-1:0] edge_out
);

  ctx_t s, s_bar;

  ctx_driver u_ctx (
    .clk      (clk),
    .rst_n    (rst_n),
    .ctx_load (ctx_load),
    .ctx_next (ctx_next),
    .s        (s),
    .s_bar    (s_bar)
  );

  assign ctx = s;

  logic [NDIR-1:0][SINGLE-1:0] c_in_s  [ROWS][COLS];
  logic [NDIR-1:0][DOUBLE-1:0] c_in_d  [ROWS][COLS];
  logic [NDIR-1:0][SINGLE-1:0] c_out_s [ROWS][COLS];
  logic [NDIR-1:0][DOUBLE-1:0] c_out_d [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c

      mcfpga_cell #(.SINGLE(SINGLE), .DOUBLE(DOUBLE), .K(K), .P(P)) u_cell (
        .clk       (clk),
        .rst_n     (rst_n),
        .prog_we   (prog_we && (prog_cell == CW'(r * COLS + c))),
        .prog_addr (prog_addr),
        .prog_data (prog_data),
        .s         (s),
        .s_bar     (s_bar),
        .in_s      (c_in_s[r][c]),
        .in_d      (c_in_d[r][c]),
        .out_s     (c_out_s[r][c]),
        .out_d     (c_out_d[r][c])
      );

      for (genvar d = 0; d < NDIR; d++) begin : g_d
        // Step towards side d and the side facing back.
        localparam int DR  = (d == 0) ? -1 : (d == 2) ? 1 : 0;
        localparam int DC  = (d == 1) ? 1 : (d == 3) ? -1 : 0;
        localparam int OPP = (d + 2) % 4;
        localparam int R1  = r + DR,     C1 = c + DC;
        localparam int R2  = r + 2 * DR, C2 = c + 2 * DC;
        localparam int POS = (d == 0 || d == 2) ? c : r;
        localparam bit IN1 = (R1 >= 0) && (R1 < ROWS) && (C1 >= 0) && (C1 < COLS);
        localparam bit IN2 = (R2 >= 0) && (R2 < ROWS) && (C2 >= 0) && (C2 < COLS);

        // Single-length lines from the neighbour or the edge.
        if (IN1) begin : g_s_int
          assign c_in_s[r][c][d] = c_out_s[R1][C1][OPP];
        end else begin : g_s_edge
          assign c_in_s[r][c][d]                = edge_in[d][POS][SINGLE-1:0];
          assign edge_out[d][POS][SINGLE-1:0]   = c_out_s[r][c][d];
        end

        // Double-length lines from the cell two steps away or the edge; a
        // cell one step inside the edge uses the second double slot.
        if (IN2) begin : g_d_int
          assign c_in_d[r][c][d] = c_out_d[R2][C2][OPP];
        end else begin : g_d_edge
          localparam int SLOT = SINGLE + (IN1 ? DOUBLE : 0);
          assign c_in_d[r][c][d]                  = edge_in[d][POS][SLOT +: DOUBLE];
          assign edge_out[d][POS][SLOT +: DOUBLE] = c_out_d[r][c][d];
        end
      end
    end
  end

  // Edge positions beyond a shorter side of a non-square array.
  for (genvar d = 0; d < NDIR; d++) begin : g_unused
    for (genvar p = ((d == 0 || d == 2) ? COLS : ROWS); p < MAXP; p++) begin : g_p
      assign edge_out[d][p] = '0;
    end
  end

endmodule
