// Self-checking test of one cell (logic block + RCM) at its default size.
// Each round clears every FGFP, then sets random crossings on in all
// contexts (constant FGFPs) and routes random context-dependent crossings
// through the shared literal paths until they are used up. The logic-block
// output is never routed to a logic-block input, so the cell has no
// combinational loop. Every context gets a random truth table; contexts
// 0-2 use the combinational output and context 3 the registered one (the
// inputs are held across a clock edge before checking). For random
// arriving lines and every context, the departing lines are compared with
// a model that keeps one bit per crossing and context, computes the
// logic-block inputs, its output and then every departing line.
module tb_mcfpga_cell;
  import mcfpga_pkg::*;
  import mc_cfg_tb_pkg::*;

  localparam int unsigned SINGLE = 2, DOUBLE = 1, K = 4;
  localparam int unsigned TR = SINGLE + DOUBLE;
  localparam int unsigned H = NDIR * TR + 1, V = NDIR * TR + K;
  localparam int unsigned P = (H * V * 3 + 99) / 100;
  localparam int unsigned STRIDE = H + V + 1;
  localparam int unsigned NRCM = H * V + P * STRIDE;
  localparam int unsigned LUT_BITS = 1 << K;
  localparam int unsigned DW = LUT_BITS + 1;
  localparam int unsigned AW = $clog2(NRCM + N_CTX);
  localparam int unsigned NX = NDIR * TR;   // arriving/departing lines

  logic                        clk = 0, rst_n;
  logic                        prog_we;
  logic [AW-1:0]               prog_addr;
  logic [DW-1:0]               prog_data;
  ctx_t                        s, s_bar;
  logic [NDIR-1:0][SINGLE-1:0] in_s, out_s;
  logic [NDIR-1:0][DOUBLE-1:0] in_d, out_d;
  int                          checks = 0, failures = 0;

  pat_t                pat [H][V];
  logic [LUT_BITS-1:0] tbl [N_CTX];
  int unsigned         next_path;
  int                  n_paths_used = 0;

  mcfpga_cell dut (.*);

  always #5 clk = ~clk;
  always_comb s_bar = ctx_t'(N_CTX - 1) - s;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int unsigned a, logic [DW-1:0] d);
    @(negedge clk);
    prog_we = 1; prog_addr = AW'(a); prog_data = d;
    @(negedge clk);
    prog_we = 0;
  endtask

  task automatic clear_all();
    for (int unsigned a = 0; a < NRCM; a++)
      wr(a, (a >= H * V && (a - H * V) % STRIDE == STRIDE - 1) ? DW'({VTH_NEVER, VTH_NEVER}) : DW'(VTH_NEVER));
    for (int h = 0; h < H; h++)
      for (int v = 0; v < V; v++) pat[h][v] = '0;
    next_path = 0;
  endtask

  task automatic route(int h, int v, pat_t p);
    if (p == '1) wr(h * V + v, DW'(VTH_ALWAYS));
    else
      for (int unsigned i = 0; i < count_runs(p); i++) begin
        int unsigned base;
        base = H * V + next_path * STRIDE;
        wr(base + h, DW'(VTH_ALWAYS));
        wr(base + H + v, DW'(VTH_ALWAYS));
        wr(base + H + V, DW'(run_window(p, i)));
        next_path++;
        n_paths_used++;
      end
    pat[h][v] = pat[h][v] | p;
  endtask

  initial begin
    rst_n = 0; prog_we = 0; prog_addr = '0; prog_data = '0; s = '0; in_s = '0; in_d = '0;
    for (int k = 0; k < N_CTX; k++) begin
      tbl[k] = LUT_BITS'($urandom);
      wr(NRCM + k, {(k == 3) ? 1'b1 : 1'b0, tbl[k]});
    end
    rst_n = 1;

    repeat (6) begin
      clear_all();
      for (int h = 0; h < H; h++)
        for (int v = 0; v < V; v++)
          if (!(h == NX && v >= NX) && $urandom_range(5) == 0) route(h, v, '1);
      // Context-dependent crossings until the paths are used up.
      while (1) begin
        pat_t p;
        int   h, v;
        do p = pat_t'($urandom); while (p == '0 || p == '1);
        if (next_path + count_runs(p) > P) break;
        do begin h = $urandom_range(H - 1); v = $urandom_range(V - 1); end
        while (h == NX && v >= NX);
        route(h, v, p);
      end

      repeat (20) begin
        logic [H-1:0] hv;
        logic [K-1:0] lbin;
        logic [NX-1:0] exp, got;
        in_s = ($bits(in_s))'($urandom);
        in_d = ($bits(in_d))'($urandom);
        for (int k = 0; k < N_CTX; k++) begin
          s = ctx_t'(k);
          @(negedge clk);   // let the registered context capture
          for (int d = 0; d < NDIR; d++) begin
            for (int t = 0; t < SINGLE; t++) hv[d * TR + t] = in_s[d][t];
            for (int j = 0; j < DOUBLE; j++) hv[d * TR + SINGLE + j] = in_d[d][j];
          end
          lbin = '0;
          for (int i = 0; i < K; i++)
            for (int h = 0; h < NX; h++)
              if (hv[h] && conventional_on(pat[h][NX + i], k)) lbin[i] = 1'b1;
          hv[NX] = tbl[k][lbin];
          exp = '0;
          for (int v = 0; v < NX; v++)
            for (int h = 0; h < H; h++)
              if (hv[h] && conventional_on(pat[h][v], k)) exp[v] = 1'b1;
          for (int d = 0; d < NDIR; d++) begin
            for (int t = 0; t < SINGLE; t++) got[d * TR + t] = out_s[d][t];
            for (int j = 0; j < DOUBLE; j++) got[d * TR + SINGLE + j] = out_d[d][j];
          end
          checks++;
          if (got !== exp) begin
            failures++;
            $display("FAIL ctx=%0d got=%b exp=%b", k, got, exp);
          end
        end
      end
    end
    if (n_paths_used == 0) begin failures++; $display("FAIL no literal path used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
