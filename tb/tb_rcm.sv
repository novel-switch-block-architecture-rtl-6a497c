// Self-checking test of the RCM switch block at its default size (4 x 4
// tracks, two shared literal paths). In each round every FGFP is first
// programmed to "never", then a configuration is built: random crossings
// that are on in all contexts (one constant FGFP each) and context-dependent
// crossings routed through the literal paths, one path per run of "on"
// contexts. Covered configurations: the two-window pattern of the example
// F(S) = F_WL(S,0,1) + F_WL(S,2,3); two crossings on one horizontal track
// with the same pattern sharing the same paths; random patterns. For random
// inputs in every context each vertical track must equal the OR of the
// horizontal tracks whose crossing a conventional switch block (one bit per
// crossing and context) would turn on.
module tb_rcm;
  import mcfpga_pkg::*;
  import mc_cfg_tb_pkg::*;

  localparam int unsigned H = 4, V = 4, P = 2;
  localparam int unsigned STRIDE = H + V + 1;
  localparam int unsigned NADDR = H * V + P * STRIDE;
  localparam int unsigned AW = $clog2(NADDR);

  logic              clk = 0;
  logic              prog_we;
  logic [AW-1:0]     prog_addr;
  logic [RCM_DW-1:0] prog_data;
  ctx_t              s, s_bar;
  logic [H-1:0]      h_in;
  logic [V-1:0]      v_out;
  int                checks = 0, failures = 0;
  pat_t              pat [H][V];
  int unsigned       next_path;
  int                n_shared = 0, n_two = 0;

  rcm dut (.*);

  always #5 clk = ~clk;
  always_comb s_bar = ctx_t'(N_CTX - 1) - s;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int unsigned a, logic [RCM_DW-1:0] d);
    @(negedge clk);
    prog_we = 1; prog_addr = AW'(a); prog_data = d;
    @(negedge clk);
    prog_we = 0;
  endtask

  task automatic clear_all();
    for (int unsigned a = 0; a < NADDR; a++)
      wr(a, (a >= H * V && (a - H * V) % STRIDE == STRIDE - 1) ? {VTH_NEVER, VTH_NEVER} : RCM_DW'(VTH_NEVER));
    for (int h = 0; h < H; h++)
      for (int v = 0; v < V; v++) pat[h][v] = '0;
    next_path = 0;
  endtask

  // Route horizontal track h to the vertical tracks in vmask with pattern p.
  task automatic route(int h, logic [V-1:0] vmask, pat_t p);
    if (p == '1) begin
      for (int v = 0; v < V; v++)
        if (vmask[v]) wr(h * V + v, RCM_DW'(VTH_ALWAYS));
    end else begin
      for (int unsigned i = 0; i < count_runs(p); i++) begin
        int unsigned base;
        base = H * V + next_path * STRIDE;
        wr(base + h, RCM_DW'(VTH_ALWAYS));
        for (int v = 0; v < V; v++)
          if (vmask[v]) wr(base + H + v, RCM_DW'(VTH_ALWAYS));
        wr(base + H + V, run_window(p, i));
        next_path++;
      end
    end
    for (int v = 0; v < V; v++)
      if (vmask[v]) pat[h][v] = pat[h][v] | p;
  endtask

  task automatic check_vectors(int n);
    repeat (n) begin
      h_in = H'($urandom);
      for (int k = 0; k < N_CTX; k++) begin
        logic [V-1:0] exp;
        s = ctx_t'(k);
        #1;
        exp = '0;
        for (int v = 0; v < V; v++)
          for (int h = 0; h < H; h++)
            if (h_in[h] && conventional_on(pat[h][v], k)) exp[v] = 1'b1;
        checks++;
        if (v_out !== exp) begin
          failures++;
          $display("FAIL S=%0d h_in=%b v_out=%b exp=%b", k, h_in, v_out, exp);
        end
      end
    end
  endtask

  initial begin
    prog_we = 0; prog_addr = '0; prog_data = '0; s = '0; h_in = '0;

    // Cleared: nothing conducts.
    clear_all();
    check_vectors(10);

    // Example F(S) on in contexts 0 and 2: two windows for one crossing.
    clear_all();
    route(1, 4'b0100, 4'b0101);
    route(0, 4'b0001, 4'b1111);
    route(3, 4'b1000, 4'b1111);
    n_two++;
    check_vectors(20);

    // Same pattern (1010) on two crossings of one horizontal track: both
    // served by the same two paths.
    clear_all();
    route(2, 4'b0011, 4'b1010);
    route(1, 4'b0100, 4'b1111);
    n_shared++;
    check_vectors(20);

    // Random configurations.
    repeat (30) begin
      pat_t p;
      int   hh;
      clear_all();
      for (int h = 0; h < H; h++)
        for (int v = 0; v < V; v++)
          if ($urandom_range(3) == 0) route(h, V'(1 << v), '1);
      do p = pat_t'($urandom); while (count_runs(p) > P || p == '1 || p == '0);
      hh = $urandom_range(H - 1);
      route(hh, V'($urandom_range(1, (1 << V) - 1)), p);
      check_vectors(10);
    end

    if (n_two == 0 || n_shared == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
