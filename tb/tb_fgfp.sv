// Self-checking test of one FGFP: every threshold 0..N_CTX against every
// control level, retention of the threshold while not programming, and
// reprogramming.
module tb_fgfp;
  import mcfpga_pkg::*;

  logic clk = 0;
  logic prog_we;
  vth_t prog_vth;
  ctx_t level;
  logic on;
  int   checks = 0, failures = 0;

  fgfp dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog_we = 0; prog_vth = '0; level = '0;
    for (int t = 0; t <= N_CTX; t++) begin
      @(negedge clk); prog_we = 1; prog_vth = vth_t'(t);
      @(negedge clk); prog_we = 0; prog_vth = vth_t'((t + 3) % (N_CTX + 1));
      repeat (2) begin
        for (int l = 0; l < N_CTX; l++) begin
          level = ctx_t'(l);
          #1;
          checks++;
          if (on !== (l >= t)) begin
            failures++;
            $display("FAIL vth=%0d level=%0d on=%0b", t, l, on);
          end
        end
        @(negedge clk);  // threshold must be retained
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
