// oc_final_adder: the adder, incrementer and inverter that turn the two rows
// left by a reduction tree into the checksum.
//
// The two 16-bit rows are added into a 17-bit result. If bit 16 is set (an
// overflow), the low 16 bits are incremented, which completes the one's
// complement sum; the increment cannot overflow again. The sum is then
// inverted to give the checksum. With CARRY_SELECT = 1 the adder instead
// forms both a + b and a + b + 1 at once and lets the carry out of a + b
// pick one through a mux, removing the incrementer from the path; both forms
// give the same result. Default 0 is the adder-incrementer chain of the
// reducer-based units.
//
// checksum_zero flags a zero checksum: on receive, summing every covered
// word including the received checksum field gives zero exactly when the
// data are intact. Purely combinational.
module oc_final_adder
  import cksum_pkg::*;
#(
  parameter bit CARRY_SELECT = 1'b0
) (
  input  word_t a,
  input  word_t b,
  output word_t sum,           // one's complement sum of a and b
  output logic  overflow,      // carry out of the 16-bit addition
  output word_t checksum,      // ~sum
  output logic  checksum_zero  // checksum == 0
);

  logic [W:0] s0;

  if (CARRY_SELECT) begin : g_csel
    word_t s1;
    always_comb begin
      s0  = {1'b0, a} + {1'b0, b};
      s1  = a + b + 16'd1;
      sum = s0[W] ? s1[W-1:0] : s0[W-1:0];
    end
  end else begin : g_inc
    always_comb begin
      s0  = {1'b0, a} + {1'b0, b};
      sum = s0[W-1:0] + word_t'(s0[W]);
    end
  end

  assign overflow      = s0[W];
  assign checksum      = ~sum;
  assign checksum_zero = (checksum == '0);

endmodule
