// codeword_sram: the memory that holds the encoded words.
//
// A DEPTH x W array with one synchronous write port and one synchronous read
// port: a write lands at the clock edge where we is high; rdata shows the word
// at raddr one clock after re is high and holds it until the next read. A read
// of the address being written in the same cycle returns the old word.
//
// To let the protection be exercised, a third port models radiation-induced
// cell upsets: when upset_en is high, the stored word at upset_addr has every
// bit that is set in upset_mask inverted at the clock edge. A write to the
// same address in the same cycle takes priority and the upset is dropped.
// The array has no reset, as an SRAM macro has none. When DEPTH is not a
// power of two, assertions flag out-of-range addresses. The depth, the port
// structure and the upset port are this design's choices.
module codeword_sram #(
  parameter int unsigned W     = 60,   // codeword width: 32 data + 28 check bits
  parameter int unsigned DEPTH = 16,   // number of words
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,          // write enable
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,          // read enable
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,       // valid the cycle after re
  input  logic          upset_en,    // flip stored bits (fault model)
  input  logic [AW-1:0] upset_addr,
  input  logic [W-1:0]  upset_mask
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[waddr] <= wdata;
    end
    if (upset_en && !(we && waddr == upset_addr)) begin
      mem[upset_addr] <= mem[upset_addr] ^ upset_mask;
    end
    if (re) begin
      rdata <= mem[raddr];
    end
  end

  // Addresses beyond DEPTH (possible only when DEPTH is not a power of two)
  // are a usage error.
  if (DEPTH != 2 ** AW) begin : g_addr_check
    always_ff @(posedge clk) begin
      if (we)       assert (int'(waddr) < DEPTH)
                      else $error("write address %0d out of range", waddr);
      if (re)       assert (int'(raddr) < DEPTH)
                      else $error("read address %0d out of range", raddr);
      if (upset_en) assert (int'(upset_addr) < DEPTH)
                      else $error("upset address %0d out of range", upset_addr);
    end
  end

endmodule
