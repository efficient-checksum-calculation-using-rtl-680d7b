// cksum_mem_block: the 16-bit word memory block that holds the data to be
// checksummed (for instance a packet header and payload).
//
// DEPTH words are written one per cycle through a simple write port (wr_en,
// wr_addr, wr_data). Every word is read in parallel on words[], so that a
// reduction unit can take many rows in one cycle; the units choose their own
// windows of it. The storage is a register array: no single-ported SRAM
// could supply the required number of words per cycle. Depth, write port and
// parallel read are this implementation's choices. Contents are cleared by
// the synchronous, active-low reset.
module cksum_mem_block
  import cksum_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned AW = (DEPTH < 2) ? 1 : $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  word_t         wr_data,
  output word_t         words [DEPTH]
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (wr_en && (32'(wr_addr) < DEPTH)) begin
      mem[wr_addr] <= wr_data;
    end
  end

  assign words = mem;

endmodule
