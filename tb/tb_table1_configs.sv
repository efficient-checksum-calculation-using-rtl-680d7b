// tb_table1_configs: the 160-word block run through the unit sizes of the
// evaluated configurations that cksum_top does not instantiate by default:
//   single leveled 211 levels (1 pass) and 19 levels,
//   single 3-to-2 160 levels (1 pass) and 17 levels (11 passes),
//   three leveled 28-level units (2 passes), three 3-to-2 27-level units.
// Checks every checksum against a reference one's complement sum and the
// pass counts that the pass schedule gives, and prints the pass counts.
module tb_table1_configs;
  import cksum_pkg::*;

  localparam int unsigned DEPTH = 160;
  localparam int NU = 6;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] num_words = '0;
  word_t mem [DEPTH];
  logic  busy [NU], done [NU], zero [NU], ovf [NU], shrt [4];
  word_t ck [NU];
  logic [7:0] passes [NU];
  int checks = 0, failures = 0;
  bit seen [NU];
  // expected passes for 160 words
  localparam int EXP [NU] = '{1, 10, 1, 11, 2, 3};

  always #5 clk = ~clk;
  always @(posedge clk) for (int u = 0; u < NU; u++) if (done[u]) seen[u] <= 1'b1;

  cksum_single_unit #(.METHOD(LEVELED), .M(211), .DEPTH(DEPTH)) u_l211 (
    .clk, .rst_n, .start, .num_words, .mem_words(mem), .busy(busy[0]), .done(done[0]),
    .checksum(ck[0]), .checksum_zero(zero[0]), .final_overflow(ovf[0]), .passes(passes[0]),
    .short_entry(shrt[0]));
  cksum_single_unit #(.METHOD(LEVELED), .M(19), .DEPTH(DEPTH)) u_l19 (
    .clk, .rst_n, .start, .num_words, .mem_words(mem), .busy(busy[1]), .done(done[1]),
    .checksum(ck[1]), .checksum_zero(zero[1]), .final_overflow(ovf[1]), .passes(passes[1]),
    .short_entry(shrt[1]));
  cksum_single_unit #(.METHOD(THREE_TO_TWO), .M(160), .DEPTH(DEPTH)) u_w160 (
    .clk, .rst_n, .start, .num_words, .mem_words(mem), .busy(busy[2]), .done(done[2]),
    .checksum(ck[2]), .checksum_zero(zero[2]), .final_overflow(ovf[2]), .passes(passes[2]),
    .short_entry(shrt[2]));
  cksum_single_unit #(.METHOD(THREE_TO_TWO), .M(17), .DEPTH(DEPTH)) u_w17 (
    .clk, .rst_n, .start, .num_words, .mem_words(mem), .busy(busy[3]), .done(done[3]),
    .checksum(ck[3]), .checksum_zero(zero[3]), .final_overflow(ovf[3]), .passes(passes[3]),
    .short_entry(shrt[3]));
  cksum_multi_unit #(.METHOD(LEVELED), .M(28), .DEPTH(DEPTH)) u_m28 (
    .clk, .rst_n, .start, .num_words, .mem_words(mem), .busy(busy[4]), .done(done[4]),
    .checksum(ck[4]), .checksum_zero(zero[4]), .final_overflow(ovf[4]), .passes(passes[4]));
  cksum_multi_unit #(.METHOD(THREE_TO_TWO), .M(27), .DEPTH(DEPTH)) u_m27 (
    .clk, .rst_n, .start, .num_words, .mem_words(mem), .busy(busy[5]), .done(done[5]),
    .checksum(ck[5]), .checksum_zero(zero[5]), .final_overflow(ovf[5]), .passes(passes[5]));

  function automatic word_t ref_ck();
    longint unsigned tot = 0;
    bit nz = 0;
    for (int i = 0; i < DEPTH; i++) begin
      tot += 64'(mem[i]);
      if (mem[i] != 0) nz = 1;
    end
    return nz ? ~word_t'(((tot - 1) % 65535) + 1) : 16'hFFFF;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5; t++) begin
      for (int i = 0; i < DEPTH; i++) mem[i] = (t == 4) ? 16'hFFFF : word_t'($urandom);
      @(negedge clk);
      for (int u = 0; u < NU; u++) seen[u] = 1'b0;
      num_words = 8'(DEPTH);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      do begin
        @(negedge clk);
        all = 1;
        for (int u = 0; u < NU; u++) all &= seen[u];
      end while (!all);
      for (int u = 0; u < NU; u++) begin
        checks += 2;
        if (ck[u] !== ref_ck()) begin
          failures++;
          $display("FAIL config %0d checksum %h expected %h", u, ck[u], ref_ck());
        end
        if (int'(passes[u]) != EXP[u]) begin
          failures++;
          $display("FAIL config %0d passes %0d expected %0d", u, passes[u], EXP[u]);
        end
      end
    end
    $display("passes for 160 words: L211=%0d L19=%0d W160=%0d W17=%0d 3xL28=%0d 3xW27=%0d",
             passes[0], passes[1], passes[2], passes[3], passes[4], passes[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
