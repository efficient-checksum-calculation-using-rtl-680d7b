// conv_cksum_unit: conventional serial checksum unit, used as the existing
// checksum unit behind the hybrid partial reducer.
//
// One 16-bit word is accepted per cycle (in_valid) and added by a 32-bit
// adder into a 32-bit partial-sum register. Its two 16-bit halves are added
// into a 17-bit result whose bit 16 is then added back by the incrementer,
// giving the 16-bit one's complement sum, and the inverter produces the
// checksum. The fold is combinational from the partial-sum register, so
// checksum is valid in the cycle after the last word was accepted. The fold
// is exact as long as the 32-bit partial sum does not overflow, i.e. for up
// to 65537 words per checksum. clear empties the partial sum; a word
// presented with clear is taken as the first word of the new sum. Reset is
// synchronous, active low.
module conv_cksum_unit
  import cksum_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_valid,
  input  word_t       in_word,
  output logic [31:0] partial_sum,
  output word_t       checksum
);

  logic [31:0] acc_base;
  logic [W:0]  fold;
  word_t       oc_sum;

  assign acc_base = clear ? 32'd0 : partial_sum;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      partial_sum <= '0;
    end else if (in_valid) begin
      partial_sum <= acc_base + {16'd0, in_word};
    end else if (clear) begin
      partial_sum <= '0;
    end
  end

  always_comb begin
    fold     = {1'b0, partial_sum[31:16]} + {1'b0, partial_sum[15:0]};
    oc_sum   = fold[W-1:0] + word_t'(fold[W]);
    checksum = ~oc_sum;
  end

endmodule
