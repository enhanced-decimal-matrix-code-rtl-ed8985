// hamming_encoder: the three parity bits of a Hamming(7,4) code for one 4-bit
// symbol d[3:0], as used for the horizontal check bits of the Modified-DMC.
//
//   p[0] = d3 ^ d1 ^ d0
//   p[1] = d3 ^ d2 ^ d0
//   p[2] = d3 ^ d2 ^ d1
//
// These are the equations of the code. Purely combinational, no clock.
module hamming_encoder
  import dmc_pkg::*;
(
  input  logic [M-1:0]   d,   // one data symbol, d[0] is the lowest data bit
  output logic [HPB-1:0] p    // parity bits p[0], p[1], p[2]
);

  always_comb begin
    p[0] = d[3] ^ d[1] ^ d[0];
    p[1] = d[3] ^ d[2] ^ d[0];
    p[2] = d[3] ^ d[2] ^ d[1];
  end

endmodule
