// mdmc_top: an SRAM protected by the Modified Decimal Matrix Code.
//
// Write path: wr_data goes through the Modified-DMC encoder, which adds 12
// Hamming parity bits over the four low symbols and 16 column XOR bits, and
// the 60-bit codeword {V, P, D} is written to the codeword SRAM at the edge
// where wr_en is high.
// Read path: the codeword at rd_addr is read at the edge where rd_en is high;
// in the next cycle the decoder (which re-uses an encoder instance to
// recompute the check bits) delivers the corrected word on rd_data together
// with rd_valid, the mask of bits it inverted (rd_err_mask), the row-0
// symbols whose Hamming syndrome was non-zero (rd_sym_err) and a flag that
// any syndrome was non-zero (rd_err_detected). Read latency is one clock.
// The stored word is not written back corrected (scrubbing is not part of the
// code).
// upset_en/upset_addr/upset_mask invert stored codeword bits at a clock edge
// to model multiple cell upsets for test. rst_n (active low, synchronous)
// clears only rd_valid; the memory itself has no reset.
// The code layout and equations follow the Modified-DMC; the SRAM depth, the
// codeword bit order, the latency and the upset port are this design's own.
module mdmc_top
  import dmc_pkg::*;
#(
  parameter int unsigned K2    = K2_DEFAULT,  // symbols per row (4: 32-bit word)
  parameter int unsigned DEPTH = 16,          // words in the SRAM
  localparam int unsigned N    = K1 * K2 * M,
  localparam int unsigned NP   = K2 * HPB,
  localparam int unsigned NV   = K2 * M,
  localparam int unsigned W    = N + NP + NV,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // write port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [N-1:0]  wr_data,
  // read port
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_valid,
  output logic [N-1:0]  rd_data,
  output logic [N-1:0]  rd_err_mask,
  output logic [K2-1:0] rd_sym_err,
  output logic          rd_err_detected,
  // cell-upset model
  input  logic          upset_en,
  input  logic [AW-1:0] upset_addr,
  input  logic [W-1:0]  upset_mask
);

  logic [NP-1:0] enc_p;
  logic [NV-1:0] enc_v;
  logic [W-1:0]  rd_cw;

  mdmc_encoder #(.K2(K2)) u_enc (
    .d (wr_data),
    .p (enc_p),
    .v (enc_v)
  );

  codeword_sram #(.W(W), .DEPTH(DEPTH)) u_sram (
    .clk        (clk),
    .we         (wr_en),
    .waddr      (wr_addr),
    .wdata      ({enc_v, enc_p, wr_data}),
    .re         (rd_en),
    .raddr      (rd_addr),
    .rdata      (rd_cw),
    .upset_en   (upset_en),
    .upset_addr (upset_addr),
    .upset_mask (upset_mask)
  );

  mdmc_decoder #(.K2(K2)) u_dec (
    .d_rx         (rd_cw[N-1:0]),
    .p_rx         (rd_cw[N +: NP]),
    .v_rx         (rd_cw[N+NP +: NV]),
    .d_corr       (rd_data),
    .err_mask     (rd_err_mask),
    .sym_err      (rd_sym_err),
    .err_detected (rd_err_detected)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= rd_en;
  end

endmodule
