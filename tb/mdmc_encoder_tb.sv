// mdmc_encoder_tb: compares the encoder's horizontal and vertical check bits
// with a bit-by-bit model of the code for the reference data word and for
// random words.
module mdmc_encoder_tb;
  import dmc_pkg::*;

  logic [31:0] d;
  logic [11:0] p;
  logic [15:0] v;
  int checks = 0, failures = 0;
  logic clk = 0;
  int cycles = 0;

  mdmc_encoder dut (.d(d), .p(p), .v(v));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [27:0] model(logic [31:0] x);
    logic [11:0] mp;
    logic [15:0] mv;
    for (int s = 0; s < 4; s++) begin
      mp[3*s]   = x[4*s+3] ^ x[4*s+1] ^ x[4*s];
      mp[3*s+1] = x[4*s+3] ^ x[4*s+2] ^ x[4*s];
      mp[3*s+2] = x[4*s+3] ^ x[4*s+2] ^ x[4*s+1];
    end
    for (int i = 0; i < 16; i++) mv[i] = x[i] ^ x[i+16];
    return {mv, mp};
  endfunction

  task automatic check(logic [31:0] x);
    logic [27:0] e;
    d = x;
    @(posedge clk);
    e = model(x);
    checks++;
    if ({v, p} !== e) begin
      failures++;
      $display("FAIL d=%h v=%h p=%h expected v=%h p=%h", x, v, p, e[27:12], e[11:0]);
    end
  endtask

  initial begin
    // reference word 1111 0101 1010 1111 1111 0110 1010 1100
    check(32'hF5AF_F6AC);
    // worked figures: V0 = D0 ^ D16 and symbol 0 = 1100 -> P0..P2 = 1,0,0
    checks++;
    if (v[0] !== (d[0] ^ d[16]) || p[2:0] !== 3'b001) begin
      failures++;
      $display("FAIL reference bits v0=%b p=%b", v[0], p[2:0]);
    end
    check(32'h0000_0000);
    check(32'hFFFF_FFFF);
    for (int i = 0; i < 32; i++) check(32'h1 << i);
    for (int i = 0; i < 500; i++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
