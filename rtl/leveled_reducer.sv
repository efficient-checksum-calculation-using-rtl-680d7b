// leveled_reducer: leveled (Dadda-style) reduction unit. N_IN rows of 16-bit
// words are reduced to K_OUT rows with the same one's complement sum.
//
// The stage sizes are fixed by the sequence 2, 3, 4, 6, 9, 13, 19, 28, 42,
// 63, 94, 141, 211, ... (x[i+1] = floor(3/2 x[i])). The first stage takes
// the tree's N_IN rows down to the largest sequence value below N_IN (12 ->
// 9 in the 12-row example), and every later stage to the next smaller
// sequence value, each stage being one row of csa_stage full adders. With
// N_IN = 12 the sizes are 12, 9, 6, 4, 3, 2: five full-adder delays.
//
// entry selects the stage at which in_rows enter the tree: 0 is the top,
// NUM_STAGES means the rows are already few enough to be the output. A short
// block placed in slots 0 .. rows-1 can thus skip the upper stages (its
// entry is cksum_pkg::entry_stage()). The stages above the entry get zero
// rows, so they do not toggle; the sum is the same for any entry at which
// all the nonzero rows fit, only the path is shorter. The entry mux and the
// zero gating are this implementation's form of the level selection and
// power saving described for the leveled unit. Purely combinational.
module leveled_reducer
  import cksum_pkg::*;
#(
  parameter int unsigned N_IN  = 12,
  parameter int unsigned K_OUT = 2,
  localparam int unsigned NUM_STAGES = num_stages(LEVELED, N_IN, K_OUT),
  localparam int unsigned EW = (NUM_STAGES < 1) ? 1 : $clog2(NUM_STAGES + 1)
) (
  input  word_t         in_rows  [N_IN],
  input  logic [EW-1:0] entry,
  output word_t         out_rows [K_OUT]
);

  // g_stage[s].rin holds the rows at the input of stage s and
  // g_stage[s].rout what stage s produces; g_stage[NUM_STAGES].rout is the
  // tree output.
  for (genvar s = 0; s <= NUM_STAGES; s++) begin : g_stage
    localparam int unsigned CUR = stage_rows(LEVELED, N_IN, K_OUT, s);
    word_t rin  [N_IN];
    word_t rout [N_IN];

    for (genvar r = 0; r < N_IN; r++) begin : g_in
      if (r >= CUR) begin : g_unused
        assign rin[r] = '0;
      end else if (s == 0) begin : g_first
        assign rin[r] = (entry == '0) ? in_rows[r] : '0;
      end else begin : g_used
        assign rin[r] = (entry == EW'(s)) ? in_rows[r] : g_stage[s-1].rout[r];
      end
    end

    if (s < NUM_STAGES) begin : g_red
      csa_stage #(
        .N  (N_IN),
        .CUR(CUR),
        .NXT(stage_rows(LEVELED, N_IN, K_OUT, s + 1))
      ) u_stage (
        .in_rows (rin),
        .out_rows(rout)
      );
    end else begin : g_last
      assign rout = rin;
    end
  end

  for (genvar j = 0; j < K_OUT; j++) begin : g_out
    if (j < N_IN) begin : g_row
      assign out_rows[j] = g_stage[NUM_STAGES].rout[j];
    end else begin : g_pad
      assign out_rows[j] = '0;
    end
  end

endmodule
