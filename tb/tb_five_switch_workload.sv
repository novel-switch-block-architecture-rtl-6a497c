// Workload: the example switch-block configuration of five switches over
// four contexts (rows written C3 C2 C1 C0):
//   G1 0001   G2 1010   G3 0000   G4 1010   G9 1111
// mapped onto one cell's RCM:
//   G1: west single 0 -> east single 0     (one literal path)
//   G2: west single 1 -> east single 1     (two literal paths ...
//   G4: west single 1 -> north single 0     ... shared with G2)
//   G3: north single 1 -> south single 0   (nothing programmed)
//   G9: north single 0 -> south single 1   (constant FGFP)
// G2 and G4 have the same data and the same source track, so they share
// both literal paths; the configuration uses three of the cell's paths.
// Every context is checked with random inputs against the table, and the
// programmed-FGFP count is compared with the 20 bits of a conventional
// switch block.
module tb_five_switch_workload;
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

  logic                        clk = 0, rst_n;
  logic                        prog_we;
  logic [AW-1:0]               prog_addr;
  logic [DW-1:0]               prog_data;
  ctx_t                        s, s_bar;
  logic [NDIR-1:0][SINGLE-1:0] in_s, out_s;
  logic [NDIR-1:0][DOUBLE-1:0] in_d, out_d;
  int                          checks = 0, failures = 0;
  int unsigned                 next_path = 0, n_fgfp = 0;

  mcfpga_cell dut (.*);

  always #5 clk = ~clk;
  always_comb s_bar = ctx_t'(N_CTX - 1) - s;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int hs(dir_e d, int t); return int'(d) * TR + t; endfunction

  task automatic wr(int unsigned a, logic [DW-1:0] d);
    @(negedge clk);
    prog_we = 1; prog_addr = AW'(a); prog_data = d;
    @(negedge clk);
    prog_we = 0;
  endtask

  // Route track h to every vertical track in vs with pattern p.
  task automatic route(int h, int vs[$], pat_t p);
    if (p == '1) begin
      foreach (vs[i]) begin wr(h * V + vs[i], DW'(VTH_ALWAYS)); n_fgfp++; end
    end else
      for (int unsigned r = 0; r < count_runs(p); r++) begin
        int unsigned base;
        base = H * V + next_path * STRIDE;
        wr(base + h, DW'(VTH_ALWAYS));
        foreach (vs[i]) wr(base + H + vs[i], DW'(VTH_ALWAYS));
        wr(base + H + V, DW'(run_window(p, r)));
        n_fgfp += 1 + vs.size() + 2;
        next_path++;
      end
  endtask

  initial begin
    pat_t g1 = 4'b0001, g2 = 4'b1010, g3 = 4'b0000, g4 = 4'b1010, g9 = 4'b1111;
    rst_n = 0; prog_we = 0; prog_addr = '0; prog_data = '0; s = '0; in_s = '0; in_d = '0;
    for (int unsigned a = 0; a < NRCM; a++)
      wr(a, (a >= H * V && (a - H * V) % STRIDE == STRIDE - 1) ? DW'({VTH_NEVER, VTH_NEVER}) : DW'(VTH_NEVER));
    for (int k = 0; k < N_CTX; k++) wr(NRCM + k, '0);
    rst_n = 1;

    route(hs(DIR_W, 0), '{hs(DIR_E, 0)}, g1);
    route(hs(DIR_W, 1), '{hs(DIR_E, 1), hs(DIR_N, 0)}, g2);   // G2 and G4 together
    route(hs(DIR_N, 0), '{hs(DIR_S, 1)}, g9);
    // G3 is off in every context: nothing to program.

    checks++;
    if (next_path != 3) begin failures++; $display("FAIL used %0d paths, expected 3", next_path); end

    repeat (50) begin
      in_s = ($bits(in_s))'($urandom);
      in_d = ($bits(in_d))'($urandom);
      for (int k = 0; k < N_CTX; k++) begin
        s = ctx_t'(k);
        #1;
        checks += 5;
        if (out_s[DIR_E][0] !== (in_s[DIR_W][0] & g1[k])) begin failures++; $display("FAIL G1 ctx %0d", k); end
        if (out_s[DIR_E][1] !== (in_s[DIR_W][1] & g2[k])) begin failures++; $display("FAIL G2 ctx %0d", k); end
        if (out_s[DIR_S][0] !== (in_s[DIR_N][1] & g3[k])) begin failures++; $display("FAIL G3 ctx %0d", k); end
        if (out_s[DIR_N][0] !== (in_s[DIR_W][1] & g4[k])) begin failures++; $display("FAIL G4 ctx %0d", k); end
        if (out_s[DIR_S][1] !== (in_s[DIR_N][0] & g9[k])) begin failures++; $display("FAIL G9 ctx %0d", k); end
      end
    end
    $display("five-switch workload: %0d literal paths, %0d FGFPs programmed on, conventional storage %0d bits",
             next_path, n_fgfp, 5 * N_CTX);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
