// tb_ones_csa: checks the full-adder row with end-around carry.
// For random and corner-case word triples, the sum and carry words must be
// the bitwise sum and majority (carry rotated one column left), and
// sum + carry must equal a + b + c in one's complement arithmetic
// (modulo 2^16 - 1).
module tb_ones_csa;
  import cksum_pkg::*;

  word_t a, b, c, s, cy;
  int checks = 0, failures = 0;

  ones_csa dut (.a(a), .b(b), .c(c), .sum(s), .carry(cy));

  function automatic int unsigned mod65535(longint unsigned v);
    return int'(v % 65535);
  endfunction

  task automatic check_one(word_t x, word_t y, word_t z);
    word_t maj;
    a = x; b = y; c = z;
    #1;
    maj = (x & y) | (x & z) | (y & z);
    checks++;
    if (s !== (x ^ y ^ z) || cy !== {maj[14:0], maj[15]}) begin
      failures++;
      $display("FAIL bits a=%h b=%h c=%h s=%h c=%h", x, y, z, s, cy);
    end
    checks++;
    if (mod65535(longint'(s) + longint'(cy)) !=
        mod65535(longint'(x) + longint'(y) + longint'(z))) begin
      failures++;
      $display("FAIL sum a=%h b=%h c=%h", x, y, z);
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
    check_one(16'hFFFF, 16'hFFFF, 16'hFFFF);
    check_one(16'h8000, 16'h8000, 16'h0000);
    check_one(16'h8000, 16'h8000, 16'h8000);
    check_one(16'h0000, 16'h0000, 16'h0000);
    check_one(16'h0001, 16'h0001, 16'h0001);
    for (int i = 0; i < 2000; i++)
      check_one(word_t'($urandom), word_t'($urandom), word_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
