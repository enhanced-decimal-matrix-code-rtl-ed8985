// codeword_sram_tb: fills the memory, reads every word back and checks the
// one-cycle read latency, that rdata holds between reads, read-old-data on a
// same-address write, and the upset port (bits inverted, write wins on a
// collision), against a shadow array kept by the testbench.
module codeword_sram_tb;
  localparam int unsigned W = 60, DEPTH = 16, AW = 4;

  logic          clk = 0;
  logic          we = 0, re = 0, upset_en = 0;
  logic [AW-1:0] waddr = '0, raddr = '0, upset_addr = '0;
  logic [W-1:0]  wdata = '0, upset_mask = '0, rdata;
  logic [W-1:0]  shadow [DEPTH];
  int checks = 0, failures = 0;
  int cycles = 0;

  codeword_sram dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    return {28'($urandom), $urandom};
  endfunction

  task automatic expect_rd(logic [W-1:0] e, string what);
    checks++;
    if (rdata !== e) begin
      failures++;
      $display("FAIL %s: rdata=%h expected %h", what, rdata, e);
    end
  endtask

  initial begin
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = rnd(); shadow[a] = wdata;
    end
    @(negedge clk) we = 0;
    // read back: data appears after exactly one edge
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      re = 1; raddr = AW'(a);
      @(negedge clk);
      re = 0;
      expect_rd(shadow[a], "read");
      @(negedge clk);
      expect_rd(shadow[a], "hold");
    end
    // read and write the same address in one cycle: old word returned
    @(negedge clk);
    we = 1; waddr = 4'd3; wdata = rnd();
    re = 1; raddr = 4'd3;
    @(negedge clk);
    we = 0; re = 0;
    expect_rd(shadow[3], "read-during-write");
    shadow[3] = wdata;
    // upsets
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      upset_en = 1; upset_addr = AW'($urandom); upset_mask = rnd();
      shadow[upset_addr] ^= upset_mask;
      @(negedge clk);
      upset_en = 0; re = 1; raddr = upset_addr;
      @(negedge clk);
      re = 0;
      expect_rd(shadow[raddr], "after upset");
    end
    // write and upset to one address in one cycle: the write wins
    @(negedge clk);
    we = 1; waddr = 4'd7; wdata = rnd();
    upset_en = 1; upset_addr = 4'd7; upset_mask = '1;
    @(negedge clk);
    we = 0; upset_en = 0; re = 1; raddr = 4'd7;
    @(negedge clk);
    re = 0;
    expect_rd(wdata, "write beats upset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
