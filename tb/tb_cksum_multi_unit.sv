// tb_cksum_multi_unit: runs blocks of 0 .. 256 words through four
// multiple-reducer checksum units (three reducers each) and compares each
// checksum with a reference one's complement sum, the pass count with
// 1 + ceil((W - 3M) / (3(M-2))) and the latency with the pass count.
//   dut_lev   defaults: leveled, 3 x 63 levels (160 words: 1 pass)
//   dut_32    3-to-2, 3 x 54 levels, carry-select adder (160 words: 1 pass)
//   dut_lev28 leveled, 3 x 28 levels (160 words: 2 passes)
//   dut_32s   3-to-2, 3 x 27 levels
// Counts that multi-pass feedback and final-adder overflow happened.
module tb_cksum_multi_unit;
  import cksum_pkg::*;

  localparam int unsigned DEPTH = 256;
  localparam int NU = 4;
  localparam int unsigned MS [NU] = '{63, 54, 28, 27};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [8:0] num_words = '0;
  word_t mem [DEPTH];

  logic        busy [NU], done [NU], zero [NU], ovf [NU];
  word_t       ck [NU];
  logic [8:0]  passes [NU];

  int checks = 0, failures = 0;
  int cyc = 0;
  int t_done [NU];
  bit seen [NU];
  int n_multipass = 0, n_ovf = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int u = 0; u < NU; u++) if (done[u]) begin
      seen[u] <= 1'b1;
      t_done[u] <= cyc;
    end
  end

  cksum_multi_unit dut_lev (
    .clk, .rst_n, .start, .num_words, .mem_words(mem), .busy(busy[0]), .done(done[0]),
    .checksum(ck[0]), .checksum_zero(zero[0]), .final_overflow(ovf[0]), .passes(passes[0]));
  cksum_multi_unit #(.METHOD(THREE_TO_TWO), .M(54), .CARRY_SELECT(1'b1)) dut_32 (
    .clk, .rst_n, .start, .num_words, .mem_words(mem), .busy(busy[1]), .done(done[1]),
    .checksum(ck[1]), .checksum_zero(zero[1]), .final_overflow(ovf[1]), .passes(passes[1]));
  cksum_multi_unit #(.METHOD(LEVELED), .M(28)) dut_lev28 (
    .clk, .rst_n, .start, .num_words, .mem_words(mem), .busy(busy[2]), .done(done[2]),
    .checksum(ck[2]), .checksum_zero(zero[2]), .final_overflow(ovf[2]), .passes(passes[2]));
  cksum_multi_unit #(.METHOD(THREE_TO_TWO), .M(27)) dut_32s (
    .clk, .rst_n, .start, .num_words, .mem_words(mem), .busy(busy[3]), .done(done[3]),
    .checksum(ck[3]), .checksum_zero(zero[3]), .final_overflow(ovf[3]), .passes(passes[3]));

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
    int first = 3 * m, later = 3 * (m - 2);
    return (n <= first) ? 1 : 1 + (n - first + later - 1) / later;
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
    check("passes 3 x 63 leveled, 160 words", int'(passes[0]), 1);
    check("passes 3 x 54 3-to-2, 160 words", int'(passes[1]), 1);
    check("passes 3 x 28 leveled, 160 words", int'(passes[2]), 2);
    run(0, 0);
    run(1, 0);
    run(2, 1);
    run(17, 0);
    run(189, 0);
    run(190, 0);
    run(160, 1);
    run(200, 2);
    run(256, 0);
    run(256, 1);
    for (int i = 0; i < 30; i++) run(int'($urandom_range(256)), int'($urandom_range(3)));
    check("multi-pass blocks seen", int'(n_multipass > 0), 1);
    check("final adder overflows seen", int'(n_ovf > 0), 1);
    $display("multipass=%0d overflow=%0d", n_multipass, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
