// cksum_multi_unit: multiple-reducer checksum unit. N_UNITS M-level
// reduction units, each with its own two feedback registers, work on the
// memory block in parallel; a 2N-level reduction unit sums their 2N output
// rows down to two, followed by the adder, incrementer and inverter.
//
// Word assignment: in the first pass unit u reduces words u*M .. u*M+M-1.
// In every later pass unit u reduces its own two feedback rows and the next
// M-2 words of a shared window: after the first pass the window starts at
// N*M and each pass advances it by N*(M-2), unit u taking the slice at
// u*(M-2) within it. One pass takes one clock cycle; in the pass that
// reaches the end of the block the 2N-level unit and the final adder
// produce the checksum, which is registered. A block of W words takes
//     P = 1                                  if W <= N*M
//     P = 1 + ceil((W - N*M) / (N*(M-2)))    otherwise
// passes, and done pulses P cycles after start was sampled (160 words with
// three 63-level or three 54-level units: one pass). The order in which
// words go to the units, the pass timing, the handshake and the zero
// padding past the end of the block are this implementation's choices; a
// leveled unit enters its tree at the deepest stage that holds its rows,
// as in cksum_single_unit. Synchronous, active-low reset.
module cksum_multi_unit
  import cksum_pkg::*;
#(
  parameter reduce_method_e METHOD       = LEVELED,
  parameter int unsigned    M            = 63,
  parameter int unsigned    N_UNITS      = 3,
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
  output logic          final_overflow,
  output logic [PW-1:0] passes
);

  localparam int unsigned F   = 2;
  localparam int unsigned NF  = 2 * N_UNITS;  // rows into the final reducer
  localparam int unsigned NST = num_stages(LEVELED, M, F);
  localparam int unsigned EW  = (NST < 1) ? 1 : $clog2(NST + 1);
  localparam int unsigned FST = num_stages(LEVELED, NF, F);
  localparam int unsigned FEW = (FST < 1) ? 1 : $clog2(FST + 1);

  initial begin
    assert (M > F && N_UNITS >= 1) else $error("cksum_multi_unit: bad M or N_UNITS");
  end

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e      state;
  logic [31:0] len, base;
  logic        first;
  word_t       fb   [N_UNITS][F];
  word_t       rows [N_UNITS][M];
  word_t       red  [N_UNITS][F];
  word_t       frows [NF];
  word_t       fred  [F];
  logic [EW-1:0] entry [N_UNITS];
  logic [31:0] consumed;
  logic        last;
  word_t       fin_sum, fin_ck;
  logic        fin_ovf, fin_zero;

  function automatic word_t fetch(input word_t mw [DEPTH], input logic [31:0] n,
                                  input logic [31:0] idx);
    return (idx < n) ? mw[idx[AW-1:0]] : '0;
  endfunction

  always_comb begin
    logic [31:0] ubase, avail, take;
    for (int unsigned u = 0; u < N_UNITS; u++) begin
      ubase = first ? u * M : base + u * (M - F);
      avail = (len > ubase) ? len - ubase : 0;
      take  = first ? ((avail < M) ? avail : M) : ((avail < M - F) ? avail : M - F);
      for (int unsigned i = 0; i < M; i++) begin
        if (first) rows[u][i] = fetch(mem_words, len, ubase + i);
        else if (i < F) rows[u][i] = fb[u][i];
        else rows[u][i] = fetch(mem_words, len, ubase + i - F);
      end
      entry[u] = EW'(entry_stage(LEVELED, M, F, first ? take : take + F));
    end
    consumed = first ? N_UNITS * M : N_UNITS * (M - F);
    last     = (base + consumed >= len);
    for (int unsigned u = 0; u < N_UNITS; u++) begin
      frows[2*u]   = red[u][0];
      frows[2*u+1] = red[u][1];
    end
  end

  for (genvar u = 0; u < N_UNITS; u++) begin : g_unit
    if (METHOD == LEVELED) begin : g_lev
      leveled_reducer #(.N_IN(M), .K_OUT(F)) u_red (
        .in_rows (rows[u]),
        .entry   (entry[u]),
        .out_rows(red[u])
      );
    end else begin : g_32
      three_to_two_reducer #(.N_IN(M), .K_OUT(F)) u_red (
        .in_rows (rows[u]),
        .out_rows(red[u])
      );
    end
  end

  // The 2N-level reduction unit.
  if (METHOD == LEVELED) begin : g_flev
    leveled_reducer #(.N_IN(NF), .K_OUT(F)) u_fred (
      .in_rows (frows),
      .entry   (FEW'(0)),
      .out_rows(fred)
    );
  end else begin : g_f32
    three_to_two_reducer #(.N_IN(NF), .K_OUT(F)) u_fred (
      .in_rows (frows),
      .out_rows(fred)
    );
  end

  oc_final_adder #(.CARRY_SELECT(CARRY_SELECT)) u_fin (
    .a            (fred[0]),
    .b            (fred[1]),
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
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: begin
          if (start) begin
            state  <= S_RUN;
            len    <= (32'(num_words) > DEPTH) ? DEPTH : 32'(num_words);
            base   <= '0;
            first  <= 1'b1;
            passes <= '0;
          end
        end
        S_RUN: begin
          fb     <= red;
          base   <= base + consumed;
          first  <= 1'b0;
          passes <= passes + 1'b1;
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

  word_t unused_sum;
  assign unused_sum = fin_sum;

endmodule
