// dmc_pkg: shared constants of the Modified Decimal Matrix Code (Modified-DMC).
//
// A data word of N bits is cut into symbols of M = 4 bits that are laid out,
// logically only, as a K1 x K2 matrix: row 0 holds symbols 0..K2-1 (the low
// half of the word), row 1 holds symbols K2..2*K2-1 (the high half). Every
// row-0 symbol gets three Hamming(7,4) parity bits (the horizontal check bits
// P) and every bit column gets one XOR parity bit over the two rows (the
// vertical check bits V). With the default K2 = 4 this gives the 32-bit word,
// 12 P bits and 16 V bits of the reference configuration: 28 check bits.
//
// M = 4 and K1 = 2 are fixed by the code itself (a Hamming(7,4) code protects
// one 4-bit symbol, and the row selection in the error locator only works with
// two rows); the number of symbols per row, K2, is a module parameter.
package dmc_pkg;

  localparam int unsigned M   = 4;   // bits per symbol
  localparam int unsigned K1  = 2;   // rows of the logical matrix
  localparam int unsigned HPB = 3;   // Hamming parity bits per symbol
  localparam int unsigned HCW = M + HPB;  // Hamming codeword width: 7

  localparam int unsigned K2_DEFAULT = 4;  // symbols per row

  // Derived sizes for a given K2.
  function automatic int unsigned data_bits(int unsigned k2);
    return K1 * k2 * M;
  endfunction

  function automatic int unsigned hcheck_bits(int unsigned k2);
    return k2 * HPB;
  endfunction

  function automatic int unsigned vcheck_bits(int unsigned k2);
    return k2 * M;
  endfunction

  function automatic int unsigned codeword_bits(int unsigned k2);
    return data_bits(k2) + hcheck_bits(k2) + vcheck_bits(k2);
  endfunction

endpackage
