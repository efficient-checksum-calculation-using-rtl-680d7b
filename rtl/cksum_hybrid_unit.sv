// cksum_hybrid_unit: partial-reduction hybrid checksum unit. An M-to-K
// reducer shrinks most of the block to K rows, and an existing serial
// checksum unit (conv_cksum_unit) sums those K rows and the words that are
// left over, one per cycle.
//
// Reduction phase, one pass per cycle: the first pass reduces words
// 0 .. M-1 to K rows, held in K feedback registers. While at least M-K words
// remain, another pass reduces the K feedback rows together with the next
// M-K words. Serial phase: the K feedback rows, then the remaining words
// (fewer than M-K), go one per cycle into the serial unit. One more cycle
// registers the serial unit's checksum and pulses done. For the 160-word
// block: 141-to-42 leveled takes one pass, then 42 + 19 = 61 serial words;
// 160-to-48 3-to-2 takes one pass and 48 serial words. Cycles from start to
// done: P + K + R + 1 for P passes and R leftover words.
//
// The M-to-K reducer is the normal tree stopped at the stage with K rows.
// With a leveled tree each pass enters at the deepest stage that can hold
// its rows. The feedback of K rows, the rule for leaving the reduction
// phase, the order of the serial words and the handshake are this
// implementation's choices. Synchronous, active-low reset.
module cksum_hybrid_unit
  import cksum_pkg::*;
#(
  parameter reduce_method_e METHOD = LEVELED,
  parameter int unsigned    M      = 141,
  parameter int unsigned    K      = 42,
  parameter int unsigned    DEPTH  = 256,
  localparam int unsigned   AW = (DEPTH < 2) ? 1 : $clog2(DEPTH),
  localparam int unsigned   CW = $clog2(DEPTH + 1),
  localparam int unsigned   PW = $clog2(DEPTH + 2),
  localparam int unsigned   SW = $clog2(DEPTH + K + 1)
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
  output logic [PW-1:0] passes,        // reduction passes of the last block
  output logic [SW-1:0] serial_words   // words summed by the serial unit
);

  localparam int unsigned NST = num_stages(LEVELED, M, K);
  localparam int unsigned EW  = (NST < 1) ? 1 : $clog2(NST + 1);

  initial begin
    assert (M > K && K >= 2) else $error("cksum_hybrid_unit: need M > K >= 2");
  end

  typedef enum logic [1:0] {S_IDLE, S_REDUCE, S_SERIAL, S_FINISH} state_e;

  state_e        state;
  logic [31:0]   len, base;
  logic          first;
  word_t         fb   [K];
  word_t         rows [M];
  word_t         red  [K];
  logic [31:0]   consumed, next_base, remain, rows_used;
  logic [EW-1:0] entry;
  logic [SW-1:0] sidx, stotal;
  word_t         s_word;
  logic          s_valid, s_clear;
  logic [31:0]   conv_partial;
  word_t         conv_ck;

  function automatic word_t fetch(input word_t mw [DEPTH], input logic [31:0] n,
                                  input logic [31:0] idx);
    return (idx < n) ? mw[idx[AW-1:0]] : '0;
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      if (first) rows[i] = fetch(mem_words, len, base + i);
      else if (i < K) rows[i] = fb[i];
      else rows[i] = fetch(mem_words, len, base + i - K);
    end
    consumed  = first ? M : M - K;
    next_base = base + consumed;
    remain    = (len > next_base) ? len - next_base : 0;
    if (first) rows_used = (len < M) ? len : M;
    else rows_used = K + (((len - base) < M - K) ? len - base : M - K);
    entry     = EW'(entry_stage(LEVELED, M, K, rows_used));
    // Serial phase source: feedback rows first, then the leftover words.
    s_valid = (state == S_SERIAL);
    s_clear = (state == S_SERIAL) && (sidx == '0);
    s_word  = (32'(sidx) < K) ? fb[sidx[$clog2(K)-1:0]]
                              : fetch(mem_words, len, base + 32'(sidx) - K);
  end

  if (METHOD == LEVELED) begin : g_lev
    leveled_reducer #(.N_IN(M), .K_OUT(K)) u_red (
      .in_rows (rows),
      .entry   (entry),
      .out_rows(red)
    );
  end else begin : g_32
    three_to_two_reducer #(.N_IN(M), .K_OUT(K)) u_red (
      .in_rows (rows),
      .out_rows(red)
    );
  end

  conv_cksum_unit u_conv (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (s_clear),
    .in_valid   (s_valid),
    .in_word    (s_word),
    .partial_sum(conv_partial),
    .checksum   (conv_ck)
  );

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      len           <= '0;
      base          <= '0;
      first         <= 1'b1;
      fb            <= '{default: '0};
      sidx          <= '0;
      stotal        <= '0;
      done          <= 1'b0;
      checksum      <= '0;
      checksum_zero <= 1'b0;
      passes        <= '0;
      serial_words  <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start) begin
            state        <= S_REDUCE;
            len          <= (32'(num_words) > DEPTH) ? DEPTH : 32'(num_words);
            base         <= '0;
            first        <= 1'b1;
            passes       <= '0;
            serial_words <= '0;
          end
        end
        S_REDUCE: begin
          fb     <= red;
          base   <= next_base;
          first  <= 1'b0;
          passes <= passes + 1'b1;
          if (remain < M - K) begin
            state  <= S_SERIAL;
            sidx   <= '0;
            stotal <= SW'(K + remain);
          end
        end
        S_SERIAL: begin
          sidx         <= sidx + 1'b1;
          serial_words <= serial_words + 1'b1;
          if (sidx == stotal - 1'b1) state <= S_FINISH;
        end
        S_FINISH: begin
          state         <= S_IDLE;
          done          <= 1'b1;
          checksum      <= conv_ck;
          checksum_zero <= (conv_ck == '0);
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  logic [31:0] unused_partial;
  assign unused_partial = conv_partial;

endmodule
