// tb_cksum_top: end-to-end test of cksum_top at its default sizes.
// Blocks are written into the memory block through its write port; one
// start pulse runs all six checksum units, and each unit's checksum, zero
// flag, pass count, serial word count and latency are compared with a
// reference model. The 160-word block is checked against the pass and
// serial-word counts of the evaluated configurations. A transmit/receive
// round trip stores the computed checksum in the block and checks that the
// receive-side sum then flags zero. Every mechanism must occur at least
// once: multi-pass feedback in the single and multiple units, a feedback
// pass and leftover serial words in the hybrids, a short entry into the
// leveled tree, a final-adder overflow and a zero (intact) result.
module tb_cksum_top;
  import cksum_pkg::*;

  localparam int DEPTH = 256;
  localparam int NE = NUM_ENGINES;
  localparam int MS [NE] = '{63, 55, 63, 54, 141, 160};
  localparam int KS [2] = '{42, 48};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, wr_en = 1'b0;
  logic [7:0] wr_addr = '0;
  word_t wr_data = '0;
  logic [8:0] num_words = '0;

  logic        busy [NE], done [NE], zero [NE];
  word_t       ck [NE];
  logic [8:0]  passes [NE];
  logic [8:0]  swords [2];
  logic        fovf [4];
  logic        short_entry;

  word_t shadow [DEPTH];
  int checks = 0, failures = 0;
  int cyc = 0;
  int t_done [NE];
  bit seen [NE];
  int n_single_multi = 0, n_multi_multi = 0, n_hyb_fb = 0, n_leftover = 0;
  int n_short = 0, n_ovf = 0, n_zero = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int u = 0; u < NE; u++) if (done[u]) begin
      seen[u] <= 1'b1;
      t_done[u] <= cyc;
    end
  end

  cksum_top dut (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .start, .num_words,
    .busy, .done, .checksum(ck), .checksum_zero(zero), .passes,
    .serial_words(swords), .final_overflow(fovf), .short_entry);

  function automatic word_t ref_ck(int n);
    longint unsigned tot = 0;
    bit nz = 0;
    for (int i = 0; i < n; i++) begin
      tot += 64'(shadow[i]);
      if (shadow[i] != 0) nz = 1;
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

  task automatic write_word(int a, word_t d);
    @(negedge clk);
    wr_en = 1'b1;
    wr_addr = 8'(a);
    wr_data = d;
    shadow[a] = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic write_block(int n, int mode);
    for (int i = 0; i < n; i++)
      write_word(i, (mode == 1) ? 16'hFFFF : (mode == 2) ? 16'h0000 :
                    (mode == 3) ? word_t'($urandom_range(3)) : word_t'($urandom));
  endtask

  // Expected schedule of unit u for an n-word block.
  task automatic schedule(int u, int n, output int p, output int sw, output int lat);
    int m = MS[u];
    sw = 0;
    if (u <= int'(E_SINGLE_32)) begin
      p = (n <= m) ? 1 : 1 + (n - m + m - 3) / (m - 2);
      lat = p + 1;
    end else if (u <= int'(E_MULTI_32)) begin
      p = (n <= 3 * m) ? 1 : 1 + (n - 3 * m + 3 * (m - 2) - 1) / (3 * (m - 2));
      lat = p + 1;
    end else begin
      int k = KS[u - int'(E_HYB_LEV)], base = m;
      p = 1;
      while (n - base >= m - k) begin
        p++;
        base += m - k;
      end
      sw = k + ((n > base) ? n - base : 0);
      lat = p + sw + 2;
    end
  endtask

  task automatic run(int n);
    int t0, p, sw, lat;
    bit all;
    @(negedge clk);
    for (int u = 0; u < NE; u++) seen[u] = 1'b0;
    num_words = 9'(n);
    start = 1'b1;
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    do begin
      @(negedge clk);
      all = 1;
      for (int u = 0; u < NE; u++) all &= seen[u];
    end while (!all);
    for (int u = 0; u < NE; u++) begin
      schedule(u, n, p, sw, lat);
      check($sformatf("ck u%0d n=%0d", u, n), int'(ck[u]), int'(ref_ck(n)));
      check($sformatf("zero u%0d n=%0d", u, n), int'(zero[u]), int'(ref_ck(n) == 0));
      check($sformatf("passes u%0d n=%0d", u, n), int'(passes[u]), p);
      check($sformatf("latency u%0d n=%0d", u, n), t_done[u] - t0, lat);
      if (u >= int'(E_HYB_LEV)) begin
        check($sformatf("serial u%0d n=%0d", u, n), int'(swords[u - int'(E_HYB_LEV)]), sw);
        if (p > 1) n_hyb_fb++;
        if (sw > KS[u - int'(E_HYB_LEV)]) n_leftover++;
      end else if (u >= int'(E_MULTI_LEV)) begin
        if (p > 1) n_multi_multi++;
      end else begin
        if (p > 1) n_single_multi++;
      end
      if (u < 4 && fovf[u]) n_ovf++;
      if (zero[u]) n_zero++;
    end
    if (short_entry) n_short++;
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t c;
    for (int i = 0; i < DEPTH; i++) shadow[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // The 160-word block of the evaluation.
    write_block(160, 0);
    run(160);
    check("single leveled 63: passes", int'(passes[E_SINGLE_LEV]), 3);
    check("single 3-to-2 55: passes", int'(passes[E_SINGLE_32]), 3);
    check("three leveled 63: passes", int'(passes[E_MULTI_LEV]), 1);
    check("three 3-to-2 54: passes", int'(passes[E_MULTI_32]), 1);
    check("hybrid 141-to-42: serial words", int'(swords[0]), 61);
    check("hybrid 160-to-48: serial words", int'(swords[1]), 48);

    // Transmit then receive: store the checksum in word 159 (was zero).
    write_word(159, 16'h0000);
    run(160);
    c = ck[E_SINGLE_LEV];
    write_word(159, c);
    run(160);
    for (int u = 0; u < NE; u++) check($sformatf("receive check u%0d", u), int'(zero[u]), 1);

    // Short block: enters the leveled tree below its top stage.
    write_block(17, 0);
    run(17);
    check("short entry for 17 words", int'(short_entry), 1);

    // Full memory, all ones, all zero, random lengths.
    write_block(256, 0);
    run(256);
    run(250);
    run(190);
    write_block(256, 1);
    run(256);
    run(1);
    write_block(40, 2);
    run(40);
    run(0);
    for (int i = 0; i < 6; i++) begin
      int n = int'($urandom_range(256));
      write_block(n, int'($urandom_range(3)));
      run(n);
    end

    check("single-unit multi-pass seen", int'(n_single_multi > 0), 1);
    check("multiple-unit multi-pass seen", int'(n_multi_multi > 0), 1);
    check("hybrid feedback pass seen", int'(n_hyb_fb > 0), 1);
    check("hybrid leftover words seen", int'(n_leftover > 0), 1);
    check("short entry seen", int'(n_short > 0), 1);
    check("final adder overflow seen", int'(n_ovf > 0), 1);
    check("zero result seen", int'(n_zero > 0), 1);
    $display("single_multipass=%0d multi_multipass=%0d hybrid_feedback=%0d leftover=%0d short_entry=%0d overflow=%0d zero=%0d",
             n_single_multi, n_multi_multi, n_hyb_fb, n_leftover, n_short, n_ovf, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
