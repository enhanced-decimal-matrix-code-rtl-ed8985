// mdmc_top_tb: end-to-end test of the protected memory at its default size
// (32-bit words, 16 words).
// Every word is written, hit with cell upsets through the upset port and read
// back; the corrected word must equal what was written, rd_err_mask must name
// exactly the upset data bits, and rd_valid must rise exactly one clock after
// rd_en. Covered on purpose, and counted: clean reads, corrections in row 0
// (Hamming-detected symbols), corrections in row 1, a full 16-bit row upset,
// the two reference upset patterns, and upsets of stored check bits, which
// must be flagged. A case that never occurs counts as a failure.
module mdmc_top_tb;
  localparam int unsigned N = 32, DEPTH = 16, AW = 4, W = 60;

  logic          clk = 0, rst_n = 0;
  logic          wr_en = 0, rd_en = 0, upset_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0, upset_addr = '0;
  logic [N-1:0]  wr_data = '0;
  logic [W-1:0]  upset_mask = '0;
  logic          rd_valid, rd_err_detected;
  logic [N-1:0]  rd_data, rd_err_mask;
  logic [3:0]    rd_sym_err;

  logic [N-1:0]  written [DEPTH];
  int checks = 0, failures = 0;
  int cycles = 0;
  int n_clean = 0, n_row0 = 0, n_row1 = 0, n_burst16 = 0, n_ref = 0, n_chk = 0;

  mdmc_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2:0] ham(logic [3:0] x);
    return {x[3] ^ x[2] ^ x[1], x[3] ^ x[2] ^ x[0], x[3] ^ x[1] ^ x[0]};
  endfunction

  task automatic write(logic [AW-1:0] a, logic [N-1:0] d);
    @(negedge clk);
    wr_en = 1; wr_addr = a; wr_data = d;
    @(negedge clk);
    wr_en = 0;
    written[a] = d;
  endtask

  task automatic upset(logic [AW-1:0] a, logic [W-1:0] m);
    @(negedge clk);
    upset_en = 1; upset_addr = a; upset_mask = m;
    @(negedge clk);
    upset_en = 0;
  endtask

  // read one word; the result must show one clock later
  task automatic read(logic [AW-1:0] a, logic [N-1:0] exp_mask, bit exp_det,
                      bit check_data);
    @(negedge clk);
    rd_en = 1; rd_addr = a;
    checks++;
    if (rd_valid) begin
      failures++;
      $display("FAIL rd_valid before the read edge");
    end
    @(negedge clk);
    rd_en = 0;
    checks++;
    if (!rd_valid) begin
      failures++;
      $display("FAIL rd_valid missing one clock after rd_en");
    end
    if (check_data) begin
      checks++;
      if (rd_data !== written[a] || rd_err_mask !== exp_mask) begin
        failures++;
        $display("FAIL addr %0d: data %h expected %h, mask %h expected %h",
                 a, rd_data, written[a], rd_err_mask, exp_mask);
      end
    end
    checks++;
    if (rd_err_detected !== exp_det) begin
      failures++;
      $display("FAIL addr %0d: err_detected=%b expected %b", a, rd_err_detected, exp_det);
    end
    @(negedge clk);
    checks++;
    if (rd_valid) begin
      failures++;
      $display("FAIL rd_valid longer than one clock");
    end
  endtask

  // a random upset pattern of the correctable kind, on data bits only
  function automatic logic [N-1:0] rand_upset();
    logic [N-1:0] u = '0;
    logic [3:0] e;
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
    return u;
  endfunction

  task automatic tally(logic [N-1:0] u);
    if (u == 0) n_clean++;
    if (u[15:0] != 0) n_row0++;
    if (u[31:16] != 0) n_row1++;
    if (u == 32'hFFFF_0000) n_burst16++;
  endtask

  initial begin
    logic [N-1:0] u;
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++;
    if (rd_valid) begin
      failures++;
      $display("FAIL rd_valid not cleared by reset");
    end

    // fill the whole memory and read it back clean
    for (int a = 0; a < DEPTH; a++) write(AW'(a), $urandom);
    for (int a = 0; a < DEPTH; a++) begin
      read(AW'(a), '0, 1'b0, 1'b1);
      tally('0);
    end

    // the reference word with both reference upset patterns
    write(4'd0, 32'hF5AF_F6AC);
    upset(4'd0, {28'b0, 32'h0C00_200F});
    read(4'd0, 32'h0C00_200F, 1'b1, 1'b1);
    tally(32'h0C00_200F); n_ref++;
    write(4'd0, written[0]);
    write(4'd1, 32'hF5AF_F6AC);
    upset(4'd1, {28'b0, 32'h0000_010F});
    read(4'd1, 32'h0000_010F, 1'b1, 1'b1);
    tally(32'h0000_010F); n_ref++;
    write(4'd1, written[1]);

    // a whole row upset
    upset(4'd2, {28'b0, 32'hFFFF_0000});
    read(4'd2, 32'hFFFF_0000, 1'b1, 1'b1);
    tally(32'hFFFF_0000);
    write(4'd2, written[2]);

    // random correctable upsets everywhere; rewrite after each read
    for (int i = 0; i < 400; i++) begin
      logic [AW-1:0] a;
      a = AW'($urandom);
      u = rand_upset();
      upset(a, {28'b0, u});
      read(a, u, u != 0, 1'b1);
      tally(u);
      write(a, ($urandom % 4 == 0) ? $urandom : written[a]);
    end

    // an upset stored check bit alone is flagged (data not compared)
    for (int b = 32; b < 60; b++) begin
      upset(4'd5, W'(1) << b);
      read(4'd5, '0, 1'b1, 1'b0);
      n_chk++;
      write(4'd5, written[5]);
    end

    checks++;
    if (n_clean == 0 || n_row0 == 0 || n_row1 == 0 || n_burst16 == 0 ||
        n_ref != 2 || n_chk == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("clean %0d, row-0 corrections %0d, row-1 corrections %0d, 16-bit row %0d, reference %0d, check-bit upsets %0d",
             n_clean, n_row0, n_row1, n_burst16, n_ref, n_chk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
