// Testbench helpers for configuring multi-context switches.
//
// A switch's configuration is written as a pattern p: bit k is the switch
// state in context k. count_runs(p) is the number of runs of consecutive
// ones, which is the number of window literals the switch needs.
// run_window(p, i) gives the thresholds of the window literal for the i-th
// run [lo, hi]: vth_up = lo (S >= lo) and vth_dn = N-1-hi (S-bar >= N-1-hi,
// i.e. S <= hi). conventional_on(p, s) is what a conventional switch with
// one stored bit per context would do: the reference for every check.
package mc_cfg_tb_pkg;
  import mcfpga_pkg::*;

  typedef logic [N_CTX-1:0] pat_t;

  function automatic int unsigned count_runs(pat_t p);
    int unsigned n = 0;
    for (int k = 0; k < N_CTX; k++)
      if (p[k] && (k == 0 || !p[k-1])) n++;
    return n;
  endfunction

  function automatic wl_cfg_t run_window(pat_t p, int unsigned idx);
    wl_cfg_t     cfg;
    int unsigned n = 0;
    int          lo = -1;
    cfg.vth_up = VTH_NEVER;
    cfg.vth_dn = VTH_NEVER;
    for (int k = 0; k <= N_CTX; k++) begin
      bit b;
      b = (k < N_CTX) ? bit'(p[k]) : 1'b0;
      if (b && lo < 0) lo = k;
      if (!b && lo >= 0) begin
        if (n == idx) begin
          cfg.vth_up = vth_t'(lo);
          cfg.vth_dn = vth_t'(N_CTX - 1 - (k - 1));
        end
        n++;
        lo = -1;
      end
    end
    return cfg;
  endfunction

  function automatic bit conventional_on(pat_t p, int unsigned s);
    return bit'(p[s]);
  endfunction

endpackage
