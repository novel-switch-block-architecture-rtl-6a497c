// Self-checking test of the context driver: reset selects context 0, a
// load takes effect at the next rising edge (one cycle), S-bar is always
// N-1-S, and without a load the context holds.
module tb_ctx_driver;
  import mcfpga_pkg::*;

  logic clk = 0, rst_n;
  logic ctx_load;
  ctx_t ctx_next;
  ctx_t s, s_bar;
  int   checks = 0, failures = 0;

  ctx_driver dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ctx(int k, string tag);
    checks++;
    if (s !== ctx_t'(k) || s_bar !== ctx_t'(N_CTX - 1 - k)) begin
      failures++;
      $display("FAIL %s: s=%0d s_bar=%0d expected %0d", tag, s, s_bar, k);
    end
  endtask

  initial begin
    int cur;
    rst_n = 0; ctx_load = 0; ctx_next = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    expect_ctx(0, "reset");
    cur = 0;
    for (int i = 0; i < 200; i++) begin
      int nxt;
      nxt = $urandom_range(N_CTX - 1);
      @(negedge clk);
      ctx_load = ($urandom_range(3) != 0);
      ctx_next = ctx_t'(nxt);
      #1 expect_ctx(cur, "before edge");   // not yet
      @(negedge clk);
      if (ctx_load) cur = nxt;
      ctx_load = 0;
      expect_ctx(cur, "one cycle after load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
