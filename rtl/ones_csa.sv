// ones_csa: one row of sixteen full adders with end-around carry, the cell
// every reduction stage is built from.
//
// Bit i of the three input words goes to full adder i. Its sum bit stays in
// column i of the sum word; its carry bit moves one column left in the carry
// word, and the carry out of column 15 wraps around to column 0. In one's
// complement arithmetic 2^16 equals 1, so the wrapped carry keeps
//   a + b + c  ==  sum + carry   (one's complement, modulo 2^16 - 1)
// and no overflow word has to be carried along, unlike a two's complement
// carry-save adder. The wrap-around follows the described reduction trees;
// the row is purely combinational.
module ones_csa
  import cksum_pkg::*;
(
  input  word_t a,
  input  word_t b,
  input  word_t c,
  output word_t sum,
  output word_t carry
);

  word_t maj;

  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a & b) | (a & c) | (b & c);
    carry = {maj[W-2:0], maj[W-1]};
  end

endmodule
