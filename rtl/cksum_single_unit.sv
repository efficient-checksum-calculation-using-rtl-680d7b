// cksum_single_unit: single-reducer checksum unit. One M-level reduction
// unit with two feedback registers (Reg1, Reg2), followed by the adder,
// incrementer and inverter of oc_final_adder.
//
// Operation: start latches num_words (clamped to DEPTH) and runs one
// reduction pass per clock cycle over the memory block's words 0 ..
// num_words-1. The first pass reduces words 0 .. M-1 to two rows, which are
// stored in Reg1/Reg2. Every later pass reduces Reg1, Reg2 and the next M-2
// words. In the pass that reaches the end of the block the two output rows
// go through the final adder and the checksum is registered. A block of W
// words therefore takes
//     P = 1                          if W <= M
//     P = 1 + ceil((W - M) / (M-2))  otherwise
// passes, and done pulses P cycles after the cycle in which start was
// sampled (160 words: 3 passes at M = 63 or M = 55, 11 at M = 17).
//
// METHOD selects a leveled or a 3-to-2 reduction tree. For the leveled tree
// each pass also chooses the deepest stage that can hold its rows (e.g. a
// 17-row pass of a 28-level unit enters at the 19-row stage), and the
// stages above it see only zeros. Words past the end of the block are read
// as zero; zero rows do not change a one's complement sum. The pass timing,
// the start/busy/done handshake and the zero padding are this
// implementation's choices. Synchronous, active-low reset.
module cksum_single_unit
  import cksum_pkg::*;
#(
  parameter reduce_method_e METHOD       = LEVELED,
  parameter int unsigned    M            = 63,
  parameter int unsigned    DEPTH        = 256,
  parameter bit             CARRY_SELECT = 1'b0,
  localparam int unsigned   AW = (DEPTH < 2) ? 1 : $clog2(DEPTH),
  localparam int unsigned   CW = $clog2(DEPTH + 1),
  localparam int unsigned   PW = $clog2(DEPTH + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] num_words,
  input  word_t         mem_words [DEPTH],
  output logic          busy,
  output logic          done,
  output word_t         checksum,
  output logic          checksum_zero,
  output logic          final_overflow,  // final adder overflowed
  output logic [PW-1:0] passes,          // passes used by the last block
  output logic          short_entry      // a pass entered below stage 0
);

  localparam int unsigned F   = 2;  // feedback rows, Reg1 and Reg2
  localparam int unsigned NST = num_stages(LEVELED, M, F);
  localparam int unsigned EW  = (NST < 1) ? 1 : $clog2(NST + 1);

  initial begin
    assert (M > F) else $error("cksum_single_unit: M must exceed 2");
  end

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e      state;
  logic [31:0] len;      // words in the block
  logic [31:0] base;     // words consumed by earlier passes
  logic        first;    // first pass: no feedback rows yet
  word_t       fb [F];   // Reg1, Reg2

  word_t       rows [M];
  word_t       red  [F];
  logic [31:0] consumed, rows_used;
  logic        last;
  logic [EW-1:0] entry;
  word_t       fin_sum, fin_ck;
  logic        fin_ovf, fin_zero;

  // Fetch word idx of the block, zero past its end.
  function automatic word_t fetch(input word_t mw [DEPTH], input logic [31:0] n,
                                  input logic [31:0] idx);
    return (idx < n) ? mw[idx[AW-1:0]] : '0;
  endfunction

  // Window of rows for this pass.
  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      if (first) rows[i] = fetch(mem_words, len, base + i);
      else if (i < F) rows[i] = fb[i];
      else rows[i] = fetch(mem_words, len, base + i - F);
    end
    consumed  = first ? M : M - F;
    last      = (base + consumed >= len);
    if (first) rows_used = (len - base < M) ? len - base : M;
    else rows_used = F + ((len - base < M - F) ? len - base : M - F);
    entry     = EW'(entry_stage(LEVELED, M, F, rows_used));
  end

  if (METHOD == LEVELED) begin : g_lev
    leveled_reducer #(.N_IN(M), .K_OUT(F)) u_red (
      .in_rows (rows),
      .entry   (entry),
      .out_rows(red)
    );
  end else begin : g_32
    three_to_two_reducer #(.N_IN(M), .K_OUT(F)) u_red (
      .in_rows (rows),
      .out_rows(red)
    );
  end

  oc_final_adder #(.CARRY_SELECT(CARRY_SELECT)) u_fin (
    .a            (red[0]),
    .b            (red[1]),
    .sum          (fin_sum),
    .overflow     (fin_ovf),
    .checksum     (fin_ck),
    .checksum_zero(fin_zero)
  );

  assign busy = (state == S_RUN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      len            <= '0;
      base           <= '0;
      first          <= 1'b1;
      fb             <= '{default: '0};
      done           <= 1'b0;
      checksum       <= '0;
      checksum_zero  <= 1'b0;
      final_overflow <= 1'b0;
      passes         <= '0;
      short_entry    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start) begin
            state       <= S_RUN;
            len         <= (32'(num_words) > DEPTH) ? DEPTH : 32'(num_words);
            base        <= '0;
            first       <= 1'b1;
            passes      <= '0;
            short_entry <= 1'b0;
          end
        end
        S_RUN: begin
          fb     <= red;
          base   <= base + consumed;
          first  <= 1'b0;
          passes <= passes + 1'b1;
          if (METHOD == LEVELED && entry != '0) short_entry <= 1'b1;
          if (last) begin
            state          <= S_IDLE;
            done           <= 1'b1;
            checksum       <= fin_ck;
            checksum_zero  <= fin_zero;
            final_overflow <= fin_ovf;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Unused with some parameter choices.
  word_t unused_sum;
  assign unused_sum = fin_sum;

endmodule
