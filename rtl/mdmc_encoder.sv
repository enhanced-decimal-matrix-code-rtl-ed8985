// mdmc_encoder: Modified-DMC encoder.
//
// The N = 2*K2*4 bit word d is viewed as a 2 x K2 matrix of 4-bit symbols:
// symbol s holds d[4s+3:4s]; symbols 0..K2-1 form row 0, symbols K2..2K2-1
// form row 1, and symbol s of row 1 sits under symbol s of row 0.
//   * Horizontal check bits: one hamming_encoder per row-0 symbol, giving
//     p[3s+2:3s] for symbol s. Row 1 carries no horizontal check bits.
//   * Vertical check bits: v[i] = d[i] ^ d[i + N/2], one per bit column.
// With K2 = 4: 32 data bits, p[11:0], v[15:0], 28 check bits in all.
//
// The same module is instantiated inside the decoder to recompute the check
// bits of the word read back (encoder re-use). Combinational, no clock.
module mdmc_encoder
  import dmc_pkg::*;
#(
  parameter int unsigned K2 = K2_DEFAULT    // symbols per row
) (
  input  logic [K1*K2*M-1:0] d,   // information bits D
  output logic [K2*HPB-1:0]  p,   // horizontal check bits P
  output logic [K2*M-1:0]    v    // vertical check bits V
);

  localparam int unsigned ROWBITS = K2 * M;

  for (genvar s = 0; s < K2; s++) begin : g_ham
    hamming_encoder u_ham (
      .d (d[s*M +: M]),
      .p (p[s*HPB +: HPB])
    );
  end

  always_comb begin
    for (int unsigned i = 0; i < ROWBITS; i++) begin
      v[i] = d[i] ^ d[i + ROWBITS];
    end
  end

endmodule
