// mdmc_decoder_tb: encodes words with a bit-level model of the code, upsets
// the data bits, and checks that the decoder returns the original word, the
// exact mask of upset bits and the detection flags.
// Upset patterns are drawn from the set the code corrects: per column of
// symbols, either nothing, any non-empty pattern in the row-1 symbol, or a
// pattern in the row-0 symbol that its Hamming code detects (every non-zero
// 4-bit pattern except d0+d1+d2, which leaves all three parity bits alone).
// The two reference words with their upset patterns and the two whole-row
// upsets are run first.
module mdmc_decoder_tb;
  import dmc_pkg::*;

  logic [31:0] d_rx, d_corr, err_mask;
  logic [11:0] p_rx;
  logic [15:0] v_rx;
  logic [3:0]  sym_err;
  logic        err_detected;
  int checks = 0, failures = 0;
  int n_row0 = 0, n_row1 = 0, max_bits = 0;
  logic clk = 0;
  int cycles = 0;

  mdmc_decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2:0] ham(logic [3:0] x);
    return {x[3] ^ x[2] ^ x[1], x[3] ^ x[2] ^ x[0], x[3] ^ x[1] ^ x[0]};
  endfunction

  function automatic logic [27:0] model(logic [31:0] x);
    logic [11:0] mp;
    for (int s = 0; s < 4; s++) mp[3*s +: 3] = ham(x[4*s +: 4]);
    return {x[31:16] ^ x[15:0], mp};
  endfunction

  task automatic run(logic [31:0] d, logic [31:0] upset);
    logic [27:0] chk;
    logic [3:0]  exp_sym;
    chk  = model(d);
    d_rx = d ^ upset;
    p_rx = chk[11:0];
    v_rx = chk[27:12];
    @(posedge clk);
    for (int s = 0; s < 4; s++) exp_sym[s] = (upset[4*s +: 4] != 0);
    checks++;
    if (d_corr !== d || err_mask !== upset || sym_err !== exp_sym ||
        err_detected !== (upset != 0)) begin
      failures++;
      $display("FAIL d=%h upset=%h d_corr=%h mask=%h sym=%b det=%b",
               d, upset, d_corr, err_mask, sym_err, err_detected);
    end
    if (upset[15:0] != 0)  n_row0++;
    if (upset[31:16] != 0) n_row1++;
    if ($countones(upset) > max_bits) max_bits = $countones(upset);
  endtask

  initial begin
    logic [31:0] u;
    logic [3:0]  e;
    // reference word, upsets at 0,1,2,3,13,26,27
    run(32'hF5AF_F6AC, 32'h0C00_200F);
    // reference word, upsets at 0,1,2,3,8
    run(32'hF5AF_F6AC, 32'h0000_010F);
    // a whole row of 16 upsets
    run(32'hF5AF_F6AC, 32'hFFFF_0000);
    run(32'hF5AF_F6AC, 32'h0000_FFFF);
    run(32'h0, 32'h0);
    for (int i = 0; i < 3000; i++) begin
      u = '0;
      for (int s = 0; s < 4; s++) begin
        case ($urandom % 3)
          0: ;
          1: begin
            do e = 4'($urandom); while (e == 0 || ham(e) == 3'b000);
            u[4*s +: 4] = e;
          end
          default: begin
            do e = 4'($urandom); while (e == 0);
            u[16 + 4*s +: 4] = e;
          end
        endcase
      end
      run($urandom, u);
    end
    // an upset stored check bit alone must at least be detected
    d_rx = 32'h1234_5678;
    {v_rx, p_rx} = model(d_rx) ^ 28'h000_0004;
    @(posedge clk);
    checks++;
    if (!err_detected || sym_err != 4'b0001) begin
      failures++;
      $display("FAIL parity-bit upset not flagged");
    end
    checks++;
    if (n_row0 == 0 || n_row1 == 0 || max_bits < 16) begin
      failures++;
      $display("FAIL coverage row0=%0d row1=%0d max=%0d", n_row0, n_row1, max_bits);
    end
    $display("corrected words: row0 %0d, row1 %0d, largest upset %0d bits",
             n_row0, n_row1, max_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
