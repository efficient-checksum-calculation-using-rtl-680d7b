// tb_conv_cksum_unit: streams blocks of random words (and all-ones blocks,
// and a block whose partial sum is 0x1FFFF, which makes the 16+16 fold
// overflow) through the serial checksum unit, one
// word per cycle, and compares the checksum with a reference one's
// complement sum. Also checks that clear starts a new sum and that the
// checksum is valid one cycle after the last word.
module tb_conv_cksum_unit;
  import cksum_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  word_t in_word = '0, ck;
  logic [31:0] psum;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  conv_cksum_unit dut (.clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
                       .in_word(in_word), .partial_sum(psum), .checksum(ck));

  function automatic word_t ref_ck(longint unsigned total, bit any_nonzero);
    word_t s;
    if (!any_nonzero) s = 16'h0000;
    else s = word_t'(((total - 1) % 65535) + 1);
    return ~s;
  endfunction

  task automatic run_block(int n, int mode);
    longint unsigned total = 0;
    bit nz = 0;
    word_t w;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      w = (mode == 1) ? 16'hFFFF : (mode == 2) ? 16'h0000 :
          (mode == 3) ? ((i % 3 == 2) ? 16'h0001 : 16'hFFFF) : word_t'($urandom);
      in_valid = 1'b1;
      clear    = (i == 0);
      in_word  = w;
      total += 64'(w);
      if (w != 0) nz = 1;
    end
    @(negedge clk);
    in_valid = 1'b0;
    clear    = 1'b0;
    checks++;
    if (ck !== ref_ck(total, nz) || psum !== 32'(total)) begin
      failures++;
      $display("FAIL n=%0d mode=%0d ck=%h exp=%h", n, mode, ck, ref_ck(total, nz));
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_block(1, 0);
    run_block(2, 1);
    run_block(160, 0);
    run_block(160, 1);
    run_block(7, 2);
    run_block(3, 3);   // partial sum 0x1FFFF: the 16+16 fold overflows
    run_block(6, 3);
    run_block(30, 3);
    for (int i = 0; i < 20; i++) run_block(1 + int'($urandom_range(300)), 0);
    run_block(1000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
