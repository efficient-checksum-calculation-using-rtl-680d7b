// csa_stage: one stage of a word reduction tree, CUR rows in, NXT rows out.
//
// The first G = CUR - NXT groups of three rows each go through a row of full
// adders (ones_csa) and become a sum row and a carry row; the remaining
// CUR - 3G rows pass to the next stage unchanged, below the new rows. Rows
// are held in arrays of N slots; slots at or above CUR are ignored and output
// slots at or above NXT are driven with zero. Both reduction rules use this
// stage: they differ only in how NXT is chosen. Grouping the first rows and
// moving the leftover rows below the new ones follows the stage diagrams of
// both methods; splitting the stage into its own module is this
// implementation's choice. Combinational, one full-adder delay.
module csa_stage
  import cksum_pkg::*;
#(
  parameter int unsigned N   = 12,
  parameter int unsigned CUR = 12,
  parameter int unsigned NXT = 9
) (
  input  word_t in_rows  [N],
  output word_t out_rows [N]
);

  localparam int unsigned G = CUR - NXT;

  initial begin
    assert (CUR <= N && NXT <= CUR && 3 * G <= CUR)
      else $error("csa_stage: cannot reduce %0d rows to %0d", CUR, NXT);
  end

  for (genvar g = 0; g < G; g++) begin : g_fa
    ones_csa u_csa (
      .a    (in_rows[3*g]),
      .b    (in_rows[3*g+1]),
      .c    (in_rows[3*g+2]),
      .sum  (out_rows[2*g]),
      .carry(out_rows[2*g+1])
    );
  end

  for (genvar r = 3 * G; r < CUR; r++) begin : g_pass
    assign out_rows[r-G] = in_rows[r];
  end

  for (genvar r = NXT; r < N; r++) begin : g_zero
    assign out_rows[r] = '0;
  end

endmodule
