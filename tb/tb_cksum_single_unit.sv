// tb_cksum_single_unit: runs blocks of 0 .. 256 words through four single
// reducer checksum units and compares each checksum with a reference one's
// complement sum, the pass count with 1 + ceil((W - M) / (M - 2)) and the
// latency with the pass count.
//   dut_lev   defaults: leveled, 63 levels (160 words: 3 passes)
//   dut_32    3-to-2, 55 levels (160 words: 3 passes)
//   dut_lev28 leveled, 28 levels; a 17-word block enters at the 19-row stage
//   dut_32s   3-to-2, 17 levels, carry-select adder (160 words: 11 passes)
// Counts that multi-pass feedback, short entry and final-adder overflow all
// happened.
module tb_cksum_single_unit;
  import cksum_pkg::*;

  localparam int unsigned DEPTH = 256;
  localparam int NU = 4;
  localparam int unsigned MS [NU] = '{63, 55, 28, 17};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [8:0] num_words = '0;
  word_t mem [DEPTH];

  logic        busy [NU], done [NU], zero [NU], ovf [NU], shrt [NU];
  word_t       ck [NU];
  logic [8:0]  passes [NU];

  int checks = 0, failures = 0;
  int cyc = 0;
  int t_done [NU];
  bit seen [NU];
  int n_multipass = 0, n_short = 0, n_ovf = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int u = 0; u < NU; u++) if (done[u]) begin
      seen[u] <= 1'b1;
      t_done[u] <= cyc;
    end
  end

  cksum_single_unit dut_lev (
    .clk, .rst_n, .start, .num_words, .mem_words(mem), .busy(busy[0]), .done(done[0]),
    .checksum(ck[0]), .checksum_zero(zero[0]), .final_overflow(ovf[0]),
    .passes(passes[0]), .short_entry(shrt[0]));
  cksum_single_unit #(.METHOD(THREE_TO_TWO), .M(55)) dut_32 (
    .clk, .rst_n, .start, .num_words, .mem_words(mem), .busy(busy[1]), .done(done[1]),
    .checksum(ck[1]), .checksum_zero(zero[1]), .final_overflow(ovf[1]),
    .passes(passes[1]), .short_entry(shrt[1]));
  cksum_single_unit #(.METHOD(LEVELED), .M(28)) dut_lev28 (
    .clk, .rst_n, .start, .num_words, .mem_words(mem), .busy(busy[2]), .done(done[2]),
    .checksum(ck[2]), .checksum_zero(zero[2]), .final_overflow(ovf[2]),
    .passes(passes[2]), .short_entry(shrt[2]));
  cksum_single_unit #(.METHOD(THREE_TO_TWO), .M(17), .CARRY_SELECT(1'b1)) dut_32s (
    .clk, .rst_n, .start, .num_words, .mem_words(mem), .busy(busy[3]), .done(done[3]),
    .checksum(ck[3]), .checksum_zero(zero[3]), .final_overflow(ovf[3]),
    .passes(passes[3]), .short_entry(shrt[3]));

  function automatic word_t ref_ck(int n);
    longint unsigned tot = 0;
    bit nz = 0;
    for (int i = 0; i < n; i++) begin
      tot += 64'(mem[i]);
      if (mem[i] != 0) nz = 1;
    end
    return nz ? ~word_t'(((tot - 1) % 65535) + 1) : 16'hFFFF;
  endfunction

  function automatic int exp_passes(int n, int m);
    return (n <= m) ? 1 : 1 + (n - m + m - 3) / (m - 2);
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic fill(int mode);
    for (int i = 0; i < DEPTH; i++)
      mem[i] = (mode == 1) ? 16'hFFFF : (mode == 2) ? 16'h0000 :
               (mode == 3) ? word_t'($urandom_range(3)) : word_t'($urandom);
  endtask

  task automatic run(int n, int mode);
    int t0;
    bit all;
    fill(mode);
    @(negedge clk);
    for (int u = 0; u < NU; u++) seen[u] = 1'b0;
    num_words = 9'(n);
    start = 1'b1;
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    do begin
      @(negedge clk);
      all = 1;
      for (int u = 0; u < NU; u++) all &= seen[u];
    end while (!all);
    for (int u = 0; u < NU; u++) begin
      int p = exp_passes(n, int'(MS[u]));
      check($sformatf("ck u%0d n=%0d", u, n), int'(ck[u]), int'(ref_ck(n)));
      check($sformatf("zero u%0d n=%0d", u, n), int'(zero[u]), int'(ref_ck(n) == 0));
      check($sformatf("passes u%0d n=%0d", u, n), int'(passes[u]), p);
      check($sformatf("latency u%0d n=%0d", u, n), t_done[u] - t0, p + 1);
      if (p > 1) n_multipass++;
      if (shrt[u]) n_short++;
      if (ovf[u]) n_ovf++;
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(160, 0);
    check("passes 63-level leveled, 160 words", int'(passes[0]), 3);
    check("passes 55-level 3-to-2, 160 words", int'(passes[1]), 3);
    check("passes 17-level 3-to-2, 160 words", int'(passes[3]), 11);
    run(17, 0);
    check("17 words enter a 28-level unit below the top", int'(shrt[2]), 1);
    run(0, 0);
    run(1, 0);
    run(2, 1);
    run(63, 0);
    run(64, 0);
    run(160, 1);
    run(200, 2);
    run(256, 0);
    run(256, 1);
    for (int i = 0; i < 30; i++) run(int'($urandom_range(256)), int'($urandom_range(3)));
    check("multi-pass blocks seen", int'(n_multipass > 0), 1);
    check("short entries seen", int'(n_short > 0), 1);
    check("final adder overflows seen", int'(n_ovf > 0), 1);
    $display("multipass=%0d short_entry=%0d overflow=%0d", n_multipass, n_short, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
