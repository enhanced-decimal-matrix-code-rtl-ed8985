// syndrome_calculator: horizontal and vertical syndromes of the Modified-DMC.
//
// Horizontal: for every row-0 symbol s, the 7-bit Hamming codeword
//   {P0 P1 P2 D3 D2 D1 D0} = {p[3s], p[3s+1], p[3s+2], d[4s+3:4s]}
// (P0 is the most significant bit) is formed twice, once with the check
// bits recomputed from the received data and once with the stored check bits,
// and the stored one is subtracted from the recomputed one as an unsigned
// integer ("decimal integer subtraction"), modulo 2^7. The difference is zero
// exactly when the two agree, so hsyn[s] != 0 flags an upset in symbol s of
// row 0 (or in its stored parity bits).
// Vertical: s_v[i] = v_re[i] ^ v_rx[i]; a one marks bit column i.
//
// The data part of both codewords is the received symbol; the code compares
// check bits, so only the parity part can differ. Combinational, no clock.
module syndrome_calculator
  import dmc_pkg::*;
#(
  parameter int unsigned K2 = K2_DEFAULT    // symbols per row
) (
  input  logic [K1*K2*M-1:0]       d_rx,  // received information bits D'
  input  logic [K2*HPB-1:0]        p_rx,  // stored horizontal check bits P
  input  logic [K2*M-1:0]          v_rx,  // stored vertical check bits V
  input  logic [K2*HPB-1:0]        p_re,  // P' recomputed from D'
  input  logic [K2*M-1:0]          v_re,  // V' recomputed from D'
  output logic [K2-1:0][HCW-1:0]   hsyn,  // horizontal syndrome per row-0 symbol
  output logic [K2*M-1:0]          s_v    // vertical syndrome bits S
);

  logic [K2-1:0][HCW-1:0] cw_re, cw_rx;

  always_comb begin
    for (int unsigned s = 0; s < K2; s++) begin
      cw_re[s] = {p_re[s*HPB], p_re[s*HPB+1], p_re[s*HPB+2], d_rx[s*M +: M]};
      cw_rx[s] = {p_rx[s*HPB], p_rx[s*HPB+1], p_rx[s*HPB+2], d_rx[s*M +: M]};
      hsyn[s]  = cw_re[s] - cw_rx[s];
    end
    s_v = v_re ^ v_rx;
  end

endmodule
