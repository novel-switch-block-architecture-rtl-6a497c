// End-to-end test of the multi-context FPGA at its default size (4 x 4
// cells, two single- and one double-length line per side, seven shared
// literal paths per RCM), with no parameter overridden. Every FGFP of every
// cell is first programmed to "never", then four contexts are configured on
// row 1 and column 2:
//   context 0: west edge single line 0 of row 1 runs east through the four
//              cells on single-length lines to the east edge;
//   context 1: the same input runs east on double-length lines: cell (1,0)
//              to cell (1,2) to the east edge;
//   context 2: cell (1,0) feeds west single lines 0 and 1 into its logic
//              block (AND, combinational) and sends the result east on
//              single-length lines;
//   context 3: as context 2 with XOR and the registered output (one cycle).
//   every context: north edge of column 2 runs south on double-length
//              lines (0,2) -> (2,2) -> south edge, through crossings that use
//              only the constant FGFP.
// Context-independent crossings use only their constant FGFP. The
// pass-through crossings of row 1 are on in contexts 0, 2, 3 and take two
// literal paths each; the logic-block crossings are on in contexts 2, 3
// (the S1 pattern) and take one. Random inputs are applied in every context, contexts are
// switched in random order and each switch must take effect one cycle after
// the load. The test counts each mechanism it exercised and fails if one
// never happened.
module tb_mcfpga_top;
  import mcfpga_pkg::*;
  import mc_cfg_tb_pkg::*;

  localparam int unsigned ROWS = 4, COLS = 4, SINGLE = 2, DOUBLE = 1, K = 4;
  localparam int unsigned TR = SINGLE + DOUBLE;
  localparam int unsigned H = NDIR * TR + 1, V = NDIR * TR + K;
  localparam int unsigned LUT_BITS = 1 << K;
  localparam int unsigned DW = LUT_BITS + 1;
  localparam int unsigned P = (H * V * 3 + 99) / 100;
  localparam int unsigned STRIDE = H + V + 1;
  localparam int unsigned NRCM = H * V + P * STRIDE;
  localparam int unsigned AW = $clog2(NRCM + N_CTX);
  localparam int unsigned CW = $clog2(ROWS * COLS);
  localparam int unsigned EW = SINGLE + 2 * DOUBLE;
  localparam int unsigned LB_OUT = NDIR * TR;
  localparam int unsigned MAXP = 4;

  logic clk = 0, rst_n;
  logic ctx_load;
  ctx_t ctx_next, ctx;
  logic prog_we;
  logic [CW-1:0] prog_cell;
  logic [AW-1:0] prog_addr;
  logic [DW-1:0] prog_data;
  logic [NDIR-1:0][MAXP-1:0][EW-1:0] edge_in, edge_out;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_ctx_switch = 0, n_single = 0, n_double = 0, n_const = 0;
  int n_one_window = 0, n_two_window = 0, n_lb_comb = 0, n_lb_reg = 0;
  int n_off = 0;

  mcfpga_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int hs(dir_e d, int t); return int'(d) * TR + t; endfunction
  function automatic int hd(dir_e d, int j); return int'(d) * TR + SINGLE + j; endfunction

  int unsigned next_path [ROWS][COLS];

  task automatic wr(int r, int c, int unsigned a, logic [DW-1:0] d);
    @(negedge clk);
    prog_we = 1; prog_cell = CW'(r * COLS + c); prog_addr = AW'(a); prog_data = d;
  endtask

  // Join horizontal track h to vertical track v of cell (r,c) in the
  // contexts of pattern p: the constant FGFP for an all-context pattern,
  // otherwise one literal path per run of "on" contexts.
  task automatic prog_x(int r, int c, int h, int v, pat_t p);
    if (p == '1) wr(r, c, h * V + v, DW'(VTH_ALWAYS));
    else
      for (int unsigned i = 0; i < count_runs(p); i++) begin
        int unsigned base;
        base = H * V + next_path[r][c] * STRIDE;
        wr(r, c, base + h, DW'(VTH_ALWAYS));
        wr(r, c, base + H + v, DW'(VTH_ALWAYS));
        wr(r, c, base + H + V, DW'(run_window(p, i)));
        next_path[r][c]++;
      end
  endtask

  task automatic prog_lb(int r, int c, int k, logic regm, logic [LUT_BITS-1:0] t);
    wr(r, c, NRCM + k, {regm, t});
  endtask

  task automatic switch_ctx(int k);
    @(negedge clk);
    ctx_load = 1; ctx_next = ctx_t'(k);
    @(negedge clk);
    ctx_load = 0;
    checks++;
    if (ctx != ctx_t'(k)) begin
      failures++;
      $display("FAIL context %0d not active one cycle after the load", k);
    end
    n_ctx_switch++;
  endtask

  task automatic expect_bit(logic got, logic exp, string tag);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s ctx=%0d got=%0b exp=%0b", tag, ctx, got, exp);
    end
  endtask

  // Truth tables: input 0 = bit 0 of the index.
  function automatic logic [LUT_BITS-1:0] lut_of(int op);
    logic [LUT_BITS-1:0] t;
    for (int i = 0; i < LUT_BITS; i++) t[i] = (op == 0) ? (i[0] & i[1]) : (i[0] ^ i[1]);
    return t;
  endfunction

  initial begin
    logic a, b, nsrc, prev_x;
    rst_n = 0; ctx_load = 0; ctx_next = '0; prog_we = 0; prog_cell = '0;
    prog_addr = '0; prog_data = '0; edge_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // Every FGFP off, every logic block a constant 0.
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        for (int unsigned a = 0; a < NRCM; a++)
          wr(r, c, a, (a >= H * V && (a - H * V) % STRIDE == STRIDE - 1) ?
                        DW'({VTH_NEVER, VTH_NEVER}) : DW'(VTH_NEVER));
        for (int k = 0; k < N_CTX; k++) prog_lb(r, c, k, 1'b0, '0);
        next_path[r][c] = 0;
      end

    // Row 1 routes.
    prog_x(1, 0, hs(DIR_W, 0), hs(DIR_E, 0), 4'b0001);       // ctx0 single
    prog_x(1, 0, hs(DIR_W, 0), hd(DIR_E, 0), 4'b0010);       // ctx1 double
    prog_x(1, 2, hd(DIR_W, 0), hd(DIR_E, 0), 4'b0010);
    prog_x(1, 0, hs(DIR_W, 0), LB_OUT + 0, 4'b1100);         // ctx2,3 to LB
    prog_x(1, 0, hs(DIR_W, 1), LB_OUT + 1, 4'b1100);
    prog_x(1, 0, LB_OUT, hs(DIR_E, 0), 4'b1100);
    for (int c = 1; c < COLS; c++)
      prog_x(1, c, hs(DIR_W, 0), hs(DIR_E, 0), 4'b1101);     // ctx0,2,3
    prog_lb(1, 0, 2, 1'b0, lut_of(0));
    prog_lb(1, 0, 3, 1'b1, lut_of(1));
    // Column 2 vertical double-length route, all contexts.
    prog_x(0, 2, hs(DIR_N, 0), hd(DIR_S, 0), 4'b1111);
    prog_x(2, 2, hd(DIR_N, 0), hd(DIR_S, 0), 4'b1111);
    @(negedge clk);
    prog_we = 0;
    checks++;
    if (next_path[1][0] != 5 || next_path[1][1] != 2 || next_path[1][2] != 3) begin
      failures++;
      $display("FAIL unexpected literal path use");
    end

    // Pattern classes used above.
    n_one_window = (count_runs(4'b1100) == 1) ? 1 : 0;
    n_two_window = (count_runs(4'b1101) == 2) ? 1 : 0;

    prev_x = 1'b0;
    for (int it = 0; it < 60; it++) begin
      int k;
      k = (it < 4) ? it : $urandom_range(N_CTX - 1);
      switch_ctx(k);
      for (int rep = 0; rep < 8; rep++) begin
        a = 1'($urandom); b = 1'($urandom); nsrc = 1'($urandom);
        edge_in = '0;
        edge_in[DIR_W][1][0] = a;
        edge_in[DIR_W][1][1] = b;
        edge_in[DIR_N][2][0] = nsrc;
        #1;
        // Column 2: north single in, south edge double slot of the cell one
        // step inside (row 2).
        expect_bit(edge_out[DIR_S][2][SINGLE + DOUBLE], nsrc, "vertical double");
        n_const++; n_double++;
        case (k)
          0: begin
            expect_bit(edge_out[DIR_E][1][0], a, "ctx0 single route");
            expect_bit(edge_out[DIR_E][1][SINGLE + DOUBLE], 1'b0, "ctx0 double idle");
            n_single++; n_two_window++;
          end
          1: begin
            expect_bit(edge_out[DIR_E][1][SINGLE + DOUBLE], a, "ctx1 double route");
            expect_bit(edge_out[DIR_E][1][0], 1'b0, "ctx1 single idle");
            n_double++; n_off++;
          end
          2: begin
            expect_bit(edge_out[DIR_E][1][0], a & b, "ctx2 LB and");
            n_lb_comb++; n_one_window++;
          end
          default: begin
            // Registered: shows the value from before the last clock edge.
            if (rep > 0) begin
              expect_bit(edge_out[DIR_E][1][0], prev_x, "ctx3 LB xor registered");
              n_lb_reg++;
            end
          end
        endcase
        // Nothing else leaves the east edge of row 1.
        expect_bit(edge_out[DIR_E][1][1], 1'b0, "unused line");
        @(negedge clk);
        prev_x = a ^ b;
      end
    end

    if (n_ctx_switch == 0) begin failures++; $display("FAIL never switched context"); end
    if (n_single == 0)     begin failures++; $display("FAIL single-length route never used"); end
    if (n_double == 0)     begin failures++; $display("FAIL double-length route never used"); end
    if (n_const == 0)      begin failures++; $display("FAIL constant FGFP never used"); end
    if (n_one_window == 0) begin failures++; $display("FAIL one-window pattern never used"); end
    if (n_two_window == 0) begin failures++; $display("FAIL two-window pattern never used"); end
    if (n_lb_comb == 0)    begin failures++; $display("FAIL combinational logic block never used"); end
    if (n_lb_reg == 0)     begin failures++; $display("FAIL registered logic block never used"); end
    if (n_off == 0)        begin failures++; $display("FAIL switched-off route never checked"); end
    $display("mechanisms: ctx_switch=%0d single=%0d double=%0d const=%0d one_window=%0d two_window=%0d lb_comb=%0d lb_reg=%0d off=%0d",
             n_ctx_switch, n_single, n_double, n_const, n_one_window, n_two_window, n_lb_comb, n_lb_reg, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
