// Self-checking test of a window literal: for every pair of thresholds and
// every context S, on must equal (S >= vth_up) && (N-1-S >= vth_dn); also
// checks the window F_WL(S,2,3) of the four-context example, which is on in
// context 2 only.
module tb_window_literal;
  import mcfpga_pkg::*;

  logic    clk = 0;
  logic    prog_we;
  wl_cfg_t prog_cfg;
  ctx_t    s, s_bar;
  logic    on;
  int      checks = 0, failures = 0;

  window_literal dut (.*);

  always #5 clk = ~clk;
  always_comb s_bar = ctx_t'(N_CTX - 1) - s;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic prog(int up, int dn);
    @(negedge clk);
    prog_we = 1; prog_cfg.vth_up = vth_t'(up); prog_cfg.vth_dn = vth_t'(dn);
    @(negedge clk);
    prog_we = 0; prog_cfg = '0;
  endtask

  initial begin
    prog_we = 0; prog_cfg = '0; s = '0;
    for (int up = 0; up <= N_CTX; up++)
      for (int dn = 0; dn <= N_CTX; dn++) begin
        prog(up, dn);
        for (int k = 0; k < N_CTX; k++) begin
          s = ctx_t'(k);
          #1;
          checks++;
          if (on !== ((k >= up) && (N_CTX - 1 - k >= dn))) begin
            failures++;
            $display("FAIL up=%0d dn=%0d S=%0d on=%0b", up, dn, k, on);
          end
        end
      end
    // Window [2,2]: up-literal threshold 2 on S, down-literal S <= 2 as
    // threshold N-1-2 on S-bar.
    prog(2, N_CTX - 1 - 2);
    for (int k = 0; k < N_CTX; k++) begin
      s = ctx_t'(k);
      #1;
      checks++;
      if (on !== (k == 2)) begin
        failures++;
        $display("FAIL window [2,2] S=%0d on=%0b", k, on);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
