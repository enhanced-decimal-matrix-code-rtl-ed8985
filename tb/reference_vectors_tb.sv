// reference_vectors_tb: runs the published example words through the
// protected memory at its default size and checks the exact words involved.
//   word      1111 0101 1010 1111 1111 0110 1010 1100 (0xF5AFF6AC)
//   upset A   bits 0,1,2,3,13,26,27 -> stored 0xF9AFD6A3 (three row-0
//             symbols and one row-1 symbol hit, 7 bits)
//   upset B   bits 0,1,2,3,8       -> stored 0xF5AFF7A3 (row 0 only)
//   upset C   all 16 bits of row 1 (the largest correctable pattern)
// For each: the raw stored data word is compared with the expected upset
// word, and the corrected output with the original word.
module reference_vectors_tb;
  localparam logic [31:0] WORD = 32'hF5AF_F6AC;

  logic        clk = 0, rst_n = 0;
  logic        wr_en = 0, rd_en = 0, upset_en = 0;
  logic [3:0]  wr_addr = '0, rd_addr = '0, upset_addr = '0;
  logic [31:0] wr_data = '0;
  logic [59:0] upset_mask = '0;
  logic        rd_valid, rd_err_detected;
  logic [31:0] rd_data, rd_err_mask;
  logic [3:0]  rd_sym_err;
  int checks = 0, failures = 0;
  int cycles = 0;

  mdmc_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(string name, logic [3:0] a, logic [31:0] upset_word,
                     logic [3:0] exp_sym);
    @(negedge clk);
    wr_en = 1; wr_addr = a; wr_data = WORD;
    @(negedge clk);
    wr_en = 0;
    upset_en = 1; upset_addr = a; upset_mask = {28'b0, WORD ^ upset_word};
    @(negedge clk);
    upset_en = 0;
    rd_en = 1; rd_addr = a;
    @(negedge clk);
    rd_en = 0;
    checks++;
    if ((rd_data ^ rd_err_mask) !== upset_word) begin
      failures++;
      $display("FAIL %s: stored word %h expected %h", name, rd_data ^ rd_err_mask, upset_word);
    end
    checks++;
    if (!rd_valid || rd_data !== WORD || !rd_err_detected || rd_sym_err !== exp_sym) begin
      failures++;
      $display("FAIL %s: corrected %h sym %b", name, rd_data, rd_sym_err);
    end else
      $display("%s: stored %h corrected %h", name, upset_word, rd_data);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run("upset A", 4'd0, 32'hF9AF_D6A3, 4'b1001);
    run("upset B", 4'd1, 32'hF5AF_F7A3, 4'b0101);
    run("upset C", 4'd2, ~WORD[31:16] << 16 | WORD[15:0], 4'b0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
