// Self-checking test of the multi-context logic block: a random truth table
// per context, combinational mode checked for every input value in every
// context, registered mode checked to give the previous cycle's table
// output while the inputs change every cycle, and reset clearing the
// flip-flop.
module tb_logic_block;
  import mcfpga_pkg::*;

  localparam int unsigned K = 4;
  localparam int unsigned LUT_BITS = 1 << K;

  logic              clk = 0, rst_n;
  logic              prog_we;
  ctx_t              prog_ctx;
  logic [LUT_BITS:0] prog_data;
  ctx_t              s;
  logic [K-1:0]      lb_in;
  logic              lb_out;
  int                checks = 0, failures = 0;
  logic [LUT_BITS-1:0] tbl [N_CTX];

  logic_block dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic prog_all(logic [N_CTX-1:0] regm);
    for (int k = 0; k < N_CTX; k++) begin
      @(negedge clk);
      tbl[k] = LUT_BITS'($urandom);
      prog_we = 1; prog_ctx = ctx_t'(k); prog_data = {regm[k], tbl[k]};
    end
    @(negedge clk);
    prog_we = 0;
  endtask

  initial begin
    logic expv, prev;
    rst_n = 0; prog_we = 0; prog_ctx = '0; prog_data = '0; s = '0; lb_in = '0;
    prog_all('0);
    @(negedge clk); rst_n = 1;
    for (int k = 0; k < N_CTX; k++)
      for (int i = 0; i < LUT_BITS; i++) begin
        s = ctx_t'(k); lb_in = K'(i);
        #1;
        checks++;
        if (lb_out !== tbl[k][i]) begin
          failures++;
          $display("FAIL comb ctx=%0d in=%0d out=%0b", k, i, lb_out);
        end
      end
    // Registered mode in every context.
    prog_all('1);
    rst_n = 0;
    #1;
    checks++;
    if (lb_out !== 1'b0) begin failures++; $display("FAIL reset"); end
    @(negedge clk); rst_n = 1;
    // New inputs each cycle; the output must show the previous cycle's
    // table value, not the current one.
    prev = 1'b0;
    for (int n = 0; n < 200; n++) begin
      s = ctx_t'($urandom_range(N_CTX - 1));
      lb_in = K'($urandom);
      #1;
      expv = tbl[s][lb_in];
      if (n > 0) begin
        checks++;
        if (lb_out !== prev) begin
          failures++;
          $display("FAIL reg ctx=%0d in=%0d out=%0b exp=%0b", s, lb_in, lb_out, prev);
        end
      end
      prev = expv;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
