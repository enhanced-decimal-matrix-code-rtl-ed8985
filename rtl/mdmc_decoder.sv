// mdmc_decoder: Modified-DMC decoder with encoder re-use.
//
// The received data d_rx is fed through an instance of the encoder itself to
// recompute the check bits P' and V'. The syndrome calculator compares them
// with the stored p_rx and v_rx (decimal subtraction of 7-bit Hamming
// codewords per row-0 symbol, XOR per column), the error locator chooses for
// each flagged column whether row 0 or row 1 was upset, and the error
// corrector inverts those bits. Fully combinational: the corrected word is
// valid in the same cycle as the codeword at the input.
module mdmc_decoder
  import dmc_pkg::*;
#(
  parameter int unsigned K2 = K2_DEFAULT    // symbols per row
) (
  input  logic [K1*K2*M-1:0] d_rx,          // received information bits D'
  input  logic [K2*HPB-1:0]  p_rx,          // stored horizontal check bits
  input  logic [K2*M-1:0]    v_rx,          // stored vertical check bits
  output logic [K1*K2*M-1:0] d_corr,        // corrected data Dcorrect
  output logic [K1*K2*M-1:0] err_mask,      // bits that were inverted
  output logic [K2-1:0]      sym_err,       // row-0 symbol s was flagged
  output logic               err_detected   // any syndrome non-zero
);

  logic [K2*HPB-1:0]      p_re;
  logic [K2*M-1:0]        v_re;
  logic [K2-1:0][HCW-1:0] hsyn;
  logic [K2*M-1:0]        s_v;

  // Encoder re-use: the same encoder recomputes the check bits.
  mdmc_encoder #(.K2(K2)) u_reenc (
    .d (d_rx),
    .p (p_re),
    .v (v_re)
  );

  syndrome_calculator #(.K2(K2)) u_syn (
    .d_rx (d_rx),
    .p_rx (p_rx),
    .v_rx (v_rx),
    .p_re (p_re),
    .v_re (v_re),
    .hsyn (hsyn),
    .s_v  (s_v)
  );

  error_locator #(.K2(K2)) u_loc (
    .hsyn         (hsyn),
    .s_v          (s_v),
    .err_mask     (err_mask),
    .sym_err      (sym_err),
    .err_detected (err_detected)
  );

  error_corrector #(.K2(K2)) u_cor (
    .d_rx     (d_rx),
    .err_mask (err_mask),
    .d_corr   (d_corr)
  );

endmodule
