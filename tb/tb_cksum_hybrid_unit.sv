// tb_cksum_hybrid_unit: runs blocks of 0 .. 256 words through four hybrid
// checksum units and compares each checksum with a reference one's
// complement sum, and the reduction passes, serial word count and latency
// with the unit's schedule (first pass M words, further passes of M-K new
// words while at least M-K remain, then K + leftover words serially).
//   dut_lev   defaults: leveled 141-to-42 (160 words: 1 pass, 61 serial)
//   dut_32    3-to-2 160-to-48 (160 words: 1 pass, 48 serial)
//   dut_lev28 leveled 28-to-9
//   dut_32s   3-to-2 20-to-6
// Counts that reduction passes with feedback and leftover serial words both
// happened.
module tb_cksum_hybrid_unit;
  import cksum_pkg::*;

  localparam int unsigned DEPTH = 256;
  localparam int NU = 4;
  localparam int unsigned MS [NU] = '{141, 160, 28, 20};
  localparam int unsigned KS [NU] = '{42, 48, 9, 6};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [8:0] num_words = '0;
  word_t mem [DEPTH];

  logic        busy [NU], done [NU], zero [NU];
  word_t       ck [NU];
  logic [8:0]  passes [NU];
  logic [8:0]  sw0, sw1, sw2, sw3;
  int          swords [NU];

  int checks = 0, failures = 0;
  int cyc = 0;
  int t_done [NU];
  bit seen [NU];
  int n_fbpass = 0, n_leftover = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int u = 0; u < NU; u++) if (done[u]) begin
      seen[u] <= 1'b1;
      t_done[u] <= cyc;
    end
  end

  assign swords[0] = int'(sw0);
  assign swords[1] = int'(sw1);
  assign swords[2] = int'(sw2);
  assign swords[3] = int'(sw3);

  cksum_hybrid_unit dut_lev (
    .clk, .rst_n, .start, .num_words, .mem_words(mem), .busy(busy[0]), .done(done[0]),
    .checksum(ck[0]), .checksum_zero(zero[0]), .passes(passes[0]), .serial_words(sw0));
  cksum_hybrid_unit #(.METHOD(THREE_TO_TWO), .M(160), .K(48)) dut_32 (
    .clk, .rst_n, .start, .num_words, .mem_words(mem), .busy(busy[1]), .done(done[1]),
    .checksum(ck[1]), .checksum_zero(zero[1]), .passes(passes[1]), .serial_words(sw1));
  cksum_hybrid_unit #(.METHOD(LEVELED), .M(28), .K(9)) dut_lev28 (
    .clk, .rst_n, .start, .num_words, .mem_words(mem), .busy(busy[2]), .done(done[2]),
    .checksum(ck[2]), .checksum_zero(zero[2]), .passes(passes[2]), .serial_words(sw2));
  cksum_hybrid_unit #(.METHOD(THREE_TO_TWO), .M(20), .K(6)) dut_32s (
    .clk, .rst_n, .start, .num_words, .mem_words(mem), .busy(busy[3]), .done(done[3]),
    .checksum(ck[3]), .checksum_zero(zero[3]), .passes(passes[3]), .serial_words(sw3));

  function automatic word_t ref_ck(int n);
    longint unsigned tot = 0;
    bit nz = 0;
    for (int i = 0; i < n; i++) begin
      tot += 64'(mem[i]);
      if (mem[i] != 0) nz = 1;
    end
    return nz ? ~word_t'(((tot - 1) % 65535) + 1) : 16'hFFFF;
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
      int m = int'(MS[u]), k = int'(KS[u]);
      int p = 1, base = m, r;
      while (n - base >= m - k) begin
        p++;
        base += m - k;
      end
      r = (n > base) ? n - base : 0;
      check($sformatf("ck u%0d n=%0d", u, n), int'(ck[u]), int'(ref_ck(n)));
      check($sformatf("zero u%0d n=%0d", u, n), int'(zero[u]), int'(ref_ck(n) == 0));
      check($sformatf("passes u%0d n=%0d", u, n), int'(passes[u]), p);
      check($sformatf("serial u%0d n=%0d", u, n), swords[u], k + r);
      check($sformatf("latency u%0d n=%0d", u, n), t_done[u] - t0, p + k + r + 2);
      if (p > 1) n_fbpass++;
      if (r > 0) n_leftover++;
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(160, 0);
    check("141-to-42, 160 words: passes", int'(passes[0]), 1);
    check("141-to-42, 160 words: serial words", swords[0], 61);
    check("160-to-48, 160 words: passes", int'(passes[1]), 1);
    check("160-to-48, 160 words: serial words", swords[1], 48);
    run(0, 0);
    run(1, 0);
    run(2, 1);
    run(50, 0);
    run(240, 0);
    run(250, 0);
    run(160, 1);
    run(200, 2);
    run(256, 0);
    run(256, 1);
    for (int i = 0; i < 20; i++) run(int'($urandom_range(256)), int'($urandom_range(3)));
    check("feedback passes seen", int'(n_fbpass > 0), 1);
    check("leftover serial words seen", int'(n_leftover > 0), 1);
    $display("feedback_passes=%0d leftover=%0d", n_fbpass, n_leftover);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
