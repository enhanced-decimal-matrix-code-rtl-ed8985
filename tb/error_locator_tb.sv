// error_locator_tb: checks the steering of each vertical syndrome bit to row
// 0 (its row-0 symbol has a non-zero horizontal syndrome) or row 1 (it has
// not), the per-symbol flags and the detection flag, for directed and random
// syndromes.
module error_locator_tb;
  import dmc_pkg::*;

  logic [3:0][6:0] hsyn;
  logic [15:0] s_v;
  logic [31:0] err_mask;
  logic [3:0]  sym_err;
  logic        err_detected;
  int checks = 0, failures = 0;
  logic clk = 0;
  int cycles = 0;

  error_locator dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check;
    logic [31:0] em;
    logic [3:0]  es;
    @(posedge clk);
    for (int s = 0; s < 4; s++) es[s] = (hsyn[s] != 0);
    for (int i = 0; i < 16; i++) begin
      em[i]    = s_v[i] && es[i/4];
      em[i+16] = s_v[i] && !es[i/4];
    end
    checks++;
    if (err_mask !== em || sym_err !== es ||
        err_detected !== (es != 0 || s_v != 0)) begin
      failures++;
      $display("FAIL hsyn=%h s_v=%h mask=%h expected %h", hsyn, s_v, err_mask, em);
    end
  endtask

  initial begin
    hsyn = '0; s_v = '0; check;                   // no error
    hsyn = '0; s_v = 16'hFFFF; check;             // whole row 1
    hsyn = '0; hsyn[0] = 7'd112; s_v = 16'h000F; check;   // symbol 0 of row 0
    hsyn = '0; hsyn[2] = 7'd1; s_v = '0; check;   // parity-bit upset only
    for (int i = 0; i < 2000; i++) begin
      for (int s = 0; s < 4; s++) hsyn[s] = ($urandom % 2) ? 7'($urandom) : 7'd0;
      s_v = 16'($urandom);
      check;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
