// tb_leveled_reducer: checks the leveled reduction unit.
//  - The stage sizes of the 12-row example must be 12, 9, 6, 4, 3, 2, and
//    a 28-level unit must send a 17-row block to its 19-row stage.
//  - For random rows, the two output rows must have the same one's
//    complement sum (modulo 2^16 - 1) as the inputs, for every entry stage
//    at which the filled rows fit; all-zero input must give zero rows.
//  - A 141-to-42 partial reducer must keep the sum in its 42 outputs.
module tb_leveled_reducer;
  import cksum_pkg::*;

  int checks = 0, failures = 0;

  // 12-row unit at its defaults
  word_t in12 [12];
  word_t out12 [2];
  logic [2:0] entry12;
  leveled_reducer dut12 (.in_rows(in12), .entry(entry12), .out_rows(out12));

  // 28-row unit
  word_t in28 [28];
  word_t out28 [2];
  logic [2:0] entry28;
  leveled_reducer #(.N_IN(28)) dut28 (.in_rows(in28), .entry(entry28), .out_rows(out28));

  // 141-to-42 partial reducer
  word_t in141 [141];
  word_t out141 [42];
  logic [1:0] entry141;
  leveled_reducer #(.N_IN(141), .K_OUT(42)) dut141 (.in_rows(in141), .entry(entry141),
                                                   .out_rows(out141));

  function automatic longint unsigned m65535(longint unsigned v);
    return v % 65535;
  endfunction

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    int unsigned exp_sizes [6] = '{12, 9, 6, 4, 3, 2};
    longint unsigned tot, got;
    int n;
    int unsigned e;

    check("stages 12", num_stages(LEVELED, 12, 2), 5);
    for (int s = 0; s < 6; s++) check("size 12", stage_rows(LEVELED, 12, 2, s), exp_sizes[s]);
    check("entry 17 of 28", entry_stage(LEVELED, 28, 2, 17), 1);
    check("stage 1 of 28", stage_rows(LEVELED, 28, 2, 1), 19);
    check("stages 141->42", num_stages(LEVELED, 141, 42), 3);
    check("stage 1 of 141", stage_rows(LEVELED, 141, 42, 1), 94);

    // all zero
    for (int i = 0; i < 12; i++) in12[i] = '0;
    entry12 = '0;
    #1;
    check("zero", {48'd0, out12[0] | out12[1]}, 0);

    // 12-row unit, every usable entry
    for (int t = 0; t < 300; t++) begin
      n = int'($urandom_range(12));
      tot = 0;
      for (int i = 0; i < 12; i++) begin
        in12[i] = (i < n) ? word_t'($urandom) : '0;
        if ($urandom_range(9) == 0 && i < n) in12[i] = 16'hFFFF;
        tot += 64'(in12[i]);
      end
      e = entry_stage(LEVELED, 12, 2, n);
      for (int unsigned k = 0; k <= e; k++) begin
        entry12 = 3'(k);
        #1;
        got = 64'(out12[0]) + 64'(out12[1]);
        check($sformatf("sum12 n=%0d entry=%0d", n, k), m65535(got), m65535(tot));
      end
    end

    // 28-row unit, 17 rows at the 19-row stage and at the top
    for (int t = 0; t < 200; t++) begin
      n = (t % 2 == 0) ? 17 : int'($urandom_range(28));
      tot = 0;
      for (int i = 0; i < 28; i++) begin
        in28[i] = (i < n) ? word_t'($urandom) : '0;
        tot += 64'(in28[i]);
      end
      for (int unsigned k = 0; k <= entry_stage(LEVELED, 28, 2, n); k++) begin
        entry28 = 3'(k);
        #1;
        got = 64'(out28[0]) + 64'(out28[1]);
        check($sformatf("sum28 n=%0d entry=%0d", n, k), m65535(got), m65535(tot));
      end
    end

    // 141-to-42
    entry141 = '0;
    for (int t = 0; t < 50; t++) begin
      tot = 0;
      for (int i = 0; i < 141; i++) begin
        in141[i] = word_t'($urandom);
        tot += 64'(in141[i]);
      end
      #1;
      got = 0;
      for (int j = 0; j < 42; j++) got += 64'(out141[j]);
      check("sum141", m65535(got), m65535(tot));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
