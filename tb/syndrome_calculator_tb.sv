// syndrome_calculator_tb: feeds random received data and check bits and
// compares the horizontal syndromes with an integer model of the 7-bit
// codeword subtraction (P0 as the most significant bit, modulo 128) and the
// vertical syndromes with a bitwise XOR model. Also runs the worked example
// of symbol 0 = 1100 read back as 0011.
module syndrome_calculator_tb;
  import dmc_pkg::*;

  logic [31:0] d_rx;
  logic [11:0] p_rx, p_re;
  logic [15:0] v_rx, v_re;
  logic [3:0][6:0] hsyn;
  logic [15:0] s_v;
  int checks = 0, failures = 0;
  logic clk = 0;
  int cycles = 0;

  syndrome_calculator dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin : watchdog
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cwval(logic [11:0] pp, logic [31:0] dd, int s);
    return pp[3*s] * 64 + pp[3*s+1] * 32 + pp[3*s+2] * 16 + int'(dd[4*s +: 4]);
  endfunction

  task automatic check;
    int diff;
    @(posedge clk);
    for (int s = 0; s < 4; s++) begin
      diff = (cwval(p_re, d_rx, s) - cwval(p_rx, d_rx, s) + 128) % 128;
      checks++;
      if (int'(hsyn[s]) != diff) begin
        failures++;
        $display("FAIL hsyn[%0d]=%0d expected %0d", s, hsyn[s], diff);
      end
      checks++;
      if ((hsyn[s] != 0) != (p_re[3*s +: 3] != p_rx[3*s +: 3])) begin
        failures++;
        $display("FAIL hsyn[%0d] zero-ness does not follow parity mismatch", s);
      end
    end
    checks++;
    if (s_v !== (v_re ^ v_rx)) begin
      failures++;
      $display("FAIL s_v=%h expected %h", s_v, v_re ^ v_rx);
    end
  endtask

  initial begin
    // Symbol 0 stored as 1100 (P0 P1 P2 = 1 0 0), read back as 0011
    // (recomputed P0 P1 P2 = 0 1 1): 0110011 - 1000011 = -16 -> 112 mod 128.
    d_rx = 32'h0000_0003;
    p_rx = 12'b001;       // p[0]=P0=1
    p_re = 12'b110;       // P1=1, P2=1
    v_rx = '0; v_re = 16'h000F;
    @(posedge clk);
    checks++;
    if (hsyn[0] != 7'd112 || hsyn[1] != 0 || s_v != 16'h000F) begin
      failures++;
      $display("FAIL worked example hsyn0=%0d s_v=%h", hsyn[0], s_v);
    end
    check;
    for (int i = 0; i < 1000; i++) begin
      d_rx = $urandom;
      p_rx = 12'($urandom);
      v_rx = 16'($urandom);
      // half of the time make the recomputed bits equal to the stored ones
      p_re = ($urandom % 2) ? p_rx : 12'($urandom);
      v_re = ($urandom % 2) ? v_rx : 16'($urandom);
      check;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
