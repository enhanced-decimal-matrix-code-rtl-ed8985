// error_locator: turns the syndromes into the mask of data bits to invert.
//
// A vertical syndrome bit s_v[i] says that bit column i holds one upset,
// either in row 0 (data bit i) or in row 1 (data bit i + N/2). Only row 0 is
// protected by horizontal check bits, so the row is chosen by the horizontal
// syndrome of the row-0 symbol that contains column i:
//   hsyn[i/4] != 0  ->  the upset is in row 0, invert d[i]
//   hsyn[i/4] == 0  ->  the upset is in row 1, invert d[i + N/2]
// Hence any pattern confined to row 1 (up to all N/2 bits) is corrected, as is
// any pattern in row 0 that the Hamming code of each hit symbol detects, as
// long as no column is hit in both rows.
// err_detected is high when any syndrome is non-zero. Combinational.
module error_locator
  import dmc_pkg::*;
#(
  parameter int unsigned K2 = K2_DEFAULT    // symbols per row
) (
  input  logic [K2-1:0][HCW-1:0] hsyn,          // horizontal syndromes
  input  logic [K2*M-1:0]        s_v,           // vertical syndromes
  output logic [K1*K2*M-1:0]     err_mask,      // 1 = data bit to invert
  output logic [K2-1:0]          sym_err,       // row-0 symbol s flagged
  output logic                   err_detected   // any syndrome non-zero
);

  localparam int unsigned ROWBITS = K2 * M;

  always_comb begin
    for (int unsigned s = 0; s < K2; s++) begin
      sym_err[s] = |hsyn[s];
    end
    for (int unsigned i = 0; i < ROWBITS; i++) begin
      err_mask[i]           = s_v[i] &  sym_err[i / M];
      err_mask[i + ROWBITS] = s_v[i] & ~sym_err[i / M];
    end
    err_detected = (|sym_err) | (|s_v);
  end

endmodule
