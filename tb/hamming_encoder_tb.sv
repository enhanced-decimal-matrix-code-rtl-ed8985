// hamming_encoder_tb: checks all 16 symbols against the Hamming(7,4) parity
// equations, and that every 7-bit codeword {p, d} so formed is at Hamming
// distance >= 3 from every other (the property the row-0 detection needs).
module hamming_encoder_tb;
  import dmc_pkg::*;

  logic [3:0] d;
  logic [2:0] p;
  int checks = 0, failures = 0;
  logic clk = 0;
  int cycles = 0;
  logic [6:0] cw [16];

  hamming_encoder dut (.d(d), .p(p));

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp_p;
    for (int i = 0; i < 16; i++) begin
      d = 4'(i);
      @(posedge clk);
      exp_p[0] = ^(d & 4'b1011);
      exp_p[1] = ^(d & 4'b1101);
      exp_p[2] = ^(d & 4'b1110);
      checks++;
      if (p !== exp_p) begin
        failures++;
        $display("FAIL d=%b p=%b expected %b", d, p, exp_p);
      end
      cw[i] = {p, d};
    end
    for (int i = 0; i < 16; i++)
      for (int j = i + 1; j < 16; j++) begin
        checks++;
        if ($countones(cw[i] ^ cw[j]) < 3) begin
          failures++;
          $display("FAIL distance %0d/%0d < 3", i, j);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
