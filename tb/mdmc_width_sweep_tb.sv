// mdmc_width_sweep_tb: runs encoder + decoder at K2 = 2, 4 and 8 symbols per
// row (16-, 32- and 64-bit words) with random upsets of the correctable kind
// (per column group: nothing, any row-1 pattern, or a row-0 pattern the
// Hamming code detects) and checks that the original word comes back and the
// mask names exactly the upset bits. The check bits are produced by a model
// in this file, not by the encoder under test.
module mdmc_width_sweep_tb;
  import dmc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  int cycles = 0;

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

  // One encoder/decoder pair per width.
  localparam int NW = 3;
  localparam int K2S [NW] = '{2, 4, 8};
  logic [63:0] d_in   [NW];   // original word (low bits used)
  logic [63:0] upset  [NW];
  logic [63:0] d_corr [NW];
  logic [63:0] mask   [NW];
  logic        done   [NW];

  for (genvar g = 0; g < NW; g++) begin : g_w
    localparam int K2 = K2S[g];
    localparam int N  = 8 * K2;
    logic [N-1:0]    d_rx, dc, em;
    logic [3*K2-1:0] p_rx;
    logic [4*K2-1:0] v_rx;
    logic [K2-1:0]   se;
    logic            det;

    always_comb begin
      d_rx = d_in[g][N-1:0] ^ upset[g][N-1:0];
      for (int s = 0; s < K2; s++) p_rx[3*s +: 3] = ham(d_in[g][4*s +: 4]);
      v_rx = d_in[g][N/2-1:0] ^ d_in[g][N-1:N/2];
      d_corr[g] = 64'(dc);
      mask[g]   = 64'(em);
    end

    mdmc_decoder #(.K2(K2)) u_dec (
      .d_rx (d_rx), .p_rx (p_rx), .v_rx (v_rx),
      .d_corr (dc), .err_mask (em), .sym_err (se), .err_detected (det)
    );
  end

  initial begin
    logic [3:0] e;
    int k2;
    for (int i = 0; i < 1000; i++) begin
      for (int g = 0; g < NW; g++) begin
        k2 = K2S[g];
        d_in[g] = {$urandom, $urandom};
        upset[g] = '0;
        for (int s = 0; s < k2; s++) begin
          case ($urandom % 3)
            0: ;
            1: begin
              do e = 4'($urandom); while (e == 0 || ham(e) == 3'b000);
              upset[g][4*s +: 4] = e;
            end
            default: begin
              do e = 4'($urandom); while (e == 0);
              upset[g][4*k2 + 4*s +: 4] = e;
            end
          endcase
        end
        if (k2 < 8) d_in[g] &= (64'(1) << (8 * k2)) - 1;
      end
      @(posedge clk);
      for (int g = 0; g < NW; g++) begin
        checks++;
        if (d_corr[g] !== d_in[g] || mask[g] !== upset[g]) begin
          failures++;
          $display("FAIL K2=%0d d=%h upset=%h corr=%h mask=%h",
                   K2S[g], d_in[g], upset[g], d_corr[g], mask[g]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
