// error_corrector_tb: inverts known data with known masks and checks that
// exactly the masked bits come out inverted.
module error_corrector_tb;
  import dmc_pkg::*;

  logic [31:0] d_rx, err_mask, d_corr;
  int checks = 0, failures = 0;
  logic clk = 0;
  int cycles = 0;

  error_corrector dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // reference: received 1111 1001 1010 1111 1101 0110 1010 0011 with the
    // upsets at 0,1,2,3,13,26,27 located -> original word
    d_rx = 32'hF9AF_D6A3;
    err_mask = 32'h0C00_200F;
    @(posedge clk);
    checks++;
    if (d_corr !== 32'hF5AF_F6AC) begin
      failures++;
      $display("FAIL reference d_corr=%h", d_corr);
    end
    for (int i = 0; i < 1000; i++) begin
      d_rx = $urandom;
      err_mask = $urandom;
      @(posedge clk);
      for (int b = 0; b < 32; b++) begin
        checks++;
        if (d_corr[b] !== (err_mask[b] ? !d_rx[b] : d_rx[b])) begin
          failures++;
          $display("FAIL bit %0d", b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
