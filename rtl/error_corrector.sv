// error_corrector: inverts the located data bits, d_corr = d_rx ^ err_mask,
// the per-bit form of "Dcorrect = D' xor S" once the error locator has
// steered each vertical syndrome bit to its row. Combinational.
module error_corrector
  import dmc_pkg::*;
#(
  parameter int unsigned K2 = K2_DEFAULT    // symbols per row
) (
  input  logic [K1*K2*M-1:0] d_rx,      // received information bits D'
  input  logic [K1*K2*M-1:0] err_mask,  // bits to invert
  output logic [K1*K2*M-1:0] d_corr     // corrected information bits
);

  always_comb d_corr = d_rx ^ err_mask;

endmodule
