// tb_oc_final_adder: checks the adder / incrementer / inverter in both of
// its forms (incrementer chain and carry-select) against a 17-bit reference
// addition with end-around carry, including the overflow and zero flags.
module tb_oc_final_adder;
  import cksum_pkg::*;

  word_t a, b;
  word_t sum0, ck0, sum1, ck1;
  logic  ov0, z0, ov1, z1;
  int checks = 0, failures = 0;
  int overflows = 0;

  oc_final_adder dut_inc (.a(a), .b(b), .sum(sum0), .overflow(ov0),
                          .checksum(ck0), .checksum_zero(z0));
  oc_final_adder #(.CARRY_SELECT(1'b1)) dut_csel (
    .a(a), .b(b), .sum(sum1), .overflow(ov1), .checksum(ck1), .checksum_zero(z1));

  task automatic check_one(word_t x, word_t y);
    logic [16:0] t;
    word_t exp_sum;
    a = x; b = y;
    #1;
    t = {1'b0, x} + {1'b0, y};
    exp_sum = t[15:0] + {15'd0, t[16]};
    if (t[16]) overflows++;
    checks++;
    if (sum0 !== exp_sum || ck0 !== ~exp_sum || ov0 !== t[16] || z0 !== (exp_sum == 16'hFFFF)) begin
      failures++;
      $display("FAIL inc a=%h b=%h sum=%h ck=%h", x, y, sum0, ck0);
    end
    checks++;
    if (sum1 !== exp_sum || ck1 !== ~exp_sum || ov1 !== t[16] || z1 !== (exp_sum == 16'hFFFF)) begin
      failures++;
      $display("FAIL csel a=%h b=%h sum=%h ck=%h", x, y, sum1, ck1);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(16'h0000, 16'h0000);
    check_one(16'hFFFF, 16'h0000);
    check_one(16'hFFFF, 16'hFFFF);
    check_one(16'h8000, 16'h8000);
    check_one(16'hFFFF, 16'h0001);
    check_one(16'h1234, 16'hEDCB);
    for (int i = 0; i < 2000; i++) check_one(word_t'($urandom), word_t'($urandom));
    checks++;
    if (overflows == 0) begin
      failures++;
      $display("FAIL no overflow case exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
