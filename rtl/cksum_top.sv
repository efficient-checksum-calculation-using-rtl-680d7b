// cksum_top: reduction-tree checksum units sharing one 16-bit word memory
// block.
//
// The memory block (cksum_mem_block, DEPTH words) is written through a
// one-word-per-cycle port. A start pulse makes six checksum units compute
// the inverted one's complement checksum of words 0 .. num_words-1 at once,
// each in its own way, indexed by cksum_pkg::engine_e:
//   E_SINGLE_LEV  one 63-level leveled reducer, Reg1/Reg2 feedback
//   E_SINGLE_32   one 55-level 3-to-2 reducer, Reg1/Reg2 feedback
//   E_MULTI_LEV   three 63-level leveled reducers + a 6-level reducer
//   E_MULTI_32    three 54-level 3-to-2 reducers + a 6-level reducer
//   E_HYB_LEV     141-to-42 leveled partial reducer + serial checksum unit
//   E_HYB_32      160-to-48 3-to-2 partial reducer + serial checksum unit
// These are the single-unit, multiple-unit and hybrid organisations with
// the sizes evaluated for a 160-word block; all six must agree. Each unit
// reports busy, a done pulse, its checksum (held until the next start), a
// zero flag for receive-side checking, and how many reduction passes (and,
// for the hybrids, serial words) the block needed. Latency in cycles from
// the start cycle: the pass count for the single and multiple units, passes
// + serial words + 1 for the hybrids (see each unit's header).
//
// Placing the six units side by side, the memory depth of 256 words, the
// carry-select final adder in the multiple-unit designs and the common
// start are this implementation's choices. Synchronous, active-low reset.
module cksum_top
  import cksum_pkg::*;
#(
  parameter int unsigned DEPTH         = 256,
  parameter int unsigned SINGLE_LEV_M  = 63,
  parameter int unsigned SINGLE_32_M   = 55,
  parameter int unsigned N_UNITS       = 3,
  parameter int unsigned MULTI_LEV_M   = 63,
  parameter int unsigned MULTI_32_M    = 54,
  parameter int unsigned HYB_LEV_M     = 141,
  parameter int unsigned HYB_LEV_K     = 42,
  parameter int unsigned HYB_32_M      = 160,
  parameter int unsigned HYB_32_K      = 48,
  localparam int unsigned AW = (DEPTH < 2) ? 1 : $clog2(DEPTH),
  localparam int unsigned CW = $clog2(DEPTH + 1),
  localparam int unsigned PW = $clog2(DEPTH + 2),
  localparam int unsigned SW = $clog2(DEPTH + ((HYB_LEV_K > HYB_32_K) ? HYB_LEV_K : HYB_32_K) + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // memory block write port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  word_t         wr_data,
  // checksum request
  input  logic          start,
  input  logic [CW-1:0] num_words,
  // per-unit results, indexed by engine_e
  output logic          busy          [NUM_ENGINES],
  output logic          done          [NUM_ENGINES],
  output word_t         checksum      [NUM_ENGINES],
  output logic          checksum_zero [NUM_ENGINES],
  output logic [PW-1:0] passes        [NUM_ENGINES],
  output logic [SW-1:0] serial_words  [2],  // [0] E_HYB_LEV, [1] E_HYB_32
  output logic          final_overflow[4],  // [0..3]: E_SINGLE_LEV .. E_MULTI_32
  output logic          short_entry         // E_SINGLE_LEV skipped upper stages
);

  word_t words [DEPTH];

  cksum_mem_block #(.DEPTH(DEPTH)) u_mem (
    .clk    (clk),
    .rst_n  (rst_n),
    .wr_en  (wr_en),
    .wr_addr(wr_addr),
    .wr_data(wr_data),
    .words  (words)
  );

  cksum_single_unit #(
    .METHOD(LEVELED), .M(SINGLE_LEV_M), .DEPTH(DEPTH), .CARRY_SELECT(1'b0)
  ) u_single_lev (
    .clk, .rst_n, .start, .num_words,
    .mem_words     (words),
    .busy          (busy[E_SINGLE_LEV]),
    .done          (done[E_SINGLE_LEV]),
    .checksum      (checksum[E_SINGLE_LEV]),
    .checksum_zero (checksum_zero[E_SINGLE_LEV]),
    .final_overflow(final_overflow[0]),
    .passes        (passes[E_SINGLE_LEV]),
    .short_entry   (short_entry)
  );

  logic unused_short_32;

  cksum_single_unit #(
    .METHOD(THREE_TO_TWO), .M(SINGLE_32_M), .DEPTH(DEPTH), .CARRY_SELECT(1'b0)
  ) u_single_32 (
    .clk, .rst_n, .start, .num_words,
    .mem_words     (words),
    .busy          (busy[E_SINGLE_32]),
    .done          (done[E_SINGLE_32]),
    .checksum      (checksum[E_SINGLE_32]),
    .checksum_zero (checksum_zero[E_SINGLE_32]),
    .final_overflow(final_overflow[1]),
    .passes        (passes[E_SINGLE_32]),
    .short_entry   (unused_short_32)
  );

  cksum_multi_unit #(
    .METHOD(LEVELED), .M(MULTI_LEV_M), .N_UNITS(N_UNITS), .DEPTH(DEPTH),
    .CARRY_SELECT(1'b1)
  ) u_multi_lev (
    .clk, .rst_n, .start, .num_words,
    .mem_words     (words),
    .busy          (busy[E_MULTI_LEV]),
    .done          (done[E_MULTI_LEV]),
    .checksum      (checksum[E_MULTI_LEV]),
    .checksum_zero (checksum_zero[E_MULTI_LEV]),
    .final_overflow(final_overflow[2]),
    .passes        (passes[E_MULTI_LEV])
  );

  cksum_multi_unit #(
    .METHOD(THREE_TO_TWO), .M(MULTI_32_M), .N_UNITS(N_UNITS), .DEPTH(DEPTH),
    .CARRY_SELECT(1'b1)
  ) u_multi_32 (
    .clk, .rst_n, .start, .num_words,
    .mem_words     (words),
    .busy          (busy[E_MULTI_32]),
    .done          (done[E_MULTI_32]),
    .checksum      (checksum[E_MULTI_32]),
    .checksum_zero (checksum_zero[E_MULTI_32]),
    .final_overflow(final_overflow[3]),
    .passes        (passes[E_MULTI_32])
  );

  logic [$clog2(DEPTH + HYB_LEV_K + 1)-1:0] sw_lev;
  logic [$clog2(DEPTH + HYB_32_K + 1)-1:0]  sw_32;

  cksum_hybrid_unit #(
    .METHOD(LEVELED), .M(HYB_LEV_M), .K(HYB_LEV_K), .DEPTH(DEPTH)
  ) u_hyb_lev (
    .clk, .rst_n, .start, .num_words,
    .mem_words    (words),
    .busy         (busy[E_HYB_LEV]),
    .done         (done[E_HYB_LEV]),
    .checksum     (checksum[E_HYB_LEV]),
    .checksum_zero(checksum_zero[E_HYB_LEV]),
    .passes       (passes[E_HYB_LEV]),
    .serial_words (sw_lev)
  );

  cksum_hybrid_unit #(
    .METHOD(THREE_TO_TWO), .M(HYB_32_M), .K(HYB_32_K), .DEPTH(DEPTH)
  ) u_hyb_32 (
    .clk, .rst_n, .start, .num_words,
    .mem_words    (words),
    .busy         (busy[E_HYB_32]),
    .done         (done[E_HYB_32]),
    .checksum     (checksum[E_HYB_32]),
    .checksum_zero(checksum_zero[E_HYB_32]),
    .passes       (passes[E_HYB_32]),
    .serial_words (sw_32)
  );

  assign serial_words[0] = SW'(sw_lev);
  assign serial_words[1] = SW'(sw_32);

endmodule
