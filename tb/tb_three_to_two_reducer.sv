// tb_three_to_two_reducer: checks the 3-to-2 reduction unit.
//  - Stage sizes: 12, 8, 6, 4, 3, 2 for 12 rows; 160 -> 107 -> 72 -> 48 for
//    the 160-to-48 partial reducer.
//  - For random rows (and all-ones rows), the outputs keep the one's
//    complement sum (modulo 2^16 - 1); all-zero input gives zero rows.
module tb_three_to_two_reducer;
  import cksum_pkg::*;

  int checks = 0, failures = 0;

  word_t in12 [12];
  word_t out12 [2];
  three_to_two_reducer dut12 (.in_rows(in12), .out_rows(out12));

  word_t in55 [55];
  word_t out55 [2];
  three_to_two_reducer #(.N_IN(55)) dut55 (.in_rows(in55), .out_rows(out55));

  word_t in160 [160];
  word_t out48 [48];
  three_to_two_reducer #(.N_IN(160), .K_OUT(48)) dut160 (.in_rows(in160), .out_rows(out48));

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
    int unsigned exp12 [6] = '{12, 8, 6, 4, 3, 2};
    int unsigned exp160 [4] = '{160, 107, 72, 48};
    longint unsigned tot, got;

    check("stages 12", num_stages(THREE_TO_TWO, 12, 2), 5);
    for (int s = 0; s < 6; s++) check("size 12", stage_rows(THREE_TO_TWO, 12, 2, s), exp12[s]);
    check("stages 160->48", num_stages(THREE_TO_TWO, 160, 48), 3);
    for (int s = 0; s < 4; s++) check("size 160", stage_rows(THREE_TO_TWO, 160, 48, s), exp160[s]);

    for (int i = 0; i < 12; i++) in12[i] = '0;
    #1;
    check("zero", {48'd0, out12[0] | out12[1]}, 0);

    for (int t = 0; t < 300; t++) begin
      tot = 0;
      for (int i = 0; i < 12; i++) begin
        in12[i] = (t % 7 == 0) ? 16'hFFFF : word_t'($urandom);
        if ($urandom_range(3) == 0) in12[i] = '0;
        tot += 64'(in12[i]);
      end
      #1;
      got = 64'(out12[0]) + 64'(out12[1]);
      check("sum12", m65535(got), m65535(tot));
    end

    for (int t = 0; t < 100; t++) begin
      tot = 0;
      for (int i = 0; i < 55; i++) begin
        in55[i] = word_t'($urandom);
        tot += 64'(in55[i]);
      end
      #1;
      got = 64'(out55[0]) + 64'(out55[1]);
      check("sum55", m65535(got), m65535(tot));
    end

    for (int t = 0; t < 50; t++) begin
      tot = 0;
      for (int i = 0; i < 160; i++) begin
        in160[i] = word_t'($urandom);
        tot += 64'(in160[i]);
      end
      #1;
      got = 0;
      for (int j = 0; j < 48; j++) got += 64'(out48[j]);
      check("sum160", m65535(got), m65535(tot));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
