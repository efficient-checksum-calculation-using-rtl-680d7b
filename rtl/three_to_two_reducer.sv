// three_to_two_reducer: 3-to-2 (Wallace-style) reduction unit. N_IN rows of
// 16-bit words are reduced to K_OUT rows with the same one's complement sum.
//
// Each stage reduces every complete group of three rows to a sum row and a
// carry row (carry shifted one column left, carry out of bit 15 wrapped to
// bit 0) and passes the one or two leftover rows on, so a stage of x rows
// yields ceil(2/3 x) rows. The stage sizes therefore follow from N_IN alone:
// 12, 8, 6, 4, 3, 2 for the 12-row example, 160, 107, 72, 48, 32, 22, 15,
// 10, 7, 5, 4, 3, 2 for a 160-row unit. The tree is fixed at elaboration
// from N_IN and K_OUT, which is the synthesis-parameter nature of this
// method; an M-to-k unit is the same tree stopped once K_OUT or fewer rows
// remain. Purely combinational, num_stages() full-adder delays.
module three_to_two_reducer
  import cksum_pkg::*;
#(
  parameter int unsigned N_IN  = 12,
  parameter int unsigned K_OUT = 2,
  localparam int unsigned NUM_STAGES = num_stages(THREE_TO_TWO, N_IN, K_OUT)
) (
  input  word_t in_rows  [N_IN],
  output word_t out_rows [K_OUT]
);

  // g_stage[s].rin holds the rows at the input of stage s;
  // g_stage[NUM_STAGES].rout is the tree output.
  for (genvar s = 0; s <= NUM_STAGES; s++) begin : g_stage
    word_t rin  [N_IN];
    word_t rout [N_IN];

    if (s == 0) begin : g_first
      assign rin = in_rows;
    end else begin : g_next
      assign rin = g_stage[s-1].rout;
    end

    if (s < NUM_STAGES) begin : g_red
      csa_stage #(
        .N  (N_IN),
        .CUR(stage_rows(THREE_TO_TWO, N_IN, K_OUT, s)),
        .NXT(stage_rows(THREE_TO_TWO, N_IN, K_OUT, s + 1))
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
