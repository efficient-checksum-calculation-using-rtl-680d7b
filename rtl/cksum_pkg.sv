// cksum_pkg: types and elaboration-time helpers shared by the reduction-tree
// checksum units.
//
// All arithmetic in these units is 16-bit one's complement addition, the sum
// used by the IP, TCP and UDP checksums. A reduction tree turns a stack of
// 16-bit words ("rows") into fewer rows with the same one's complement sum,
// three rows at a time, until two (or k) remain.
//
// Two rules for the number of rows per stage are supported:
//   LEVELED      fixed stage sizes 2, 3, 4, 6, 9, 13, 19, 28, ...
//                (x[i+1] = floor(3/2 * x[i]), Dadda's sequence). A stage of
//                x rows is reduced to the largest sequence value below x.
//   THREE_TO_TWO greedy: every complete group of three rows is reduced, so a
//                stage of x rows becomes ceil(2/3 * x) rows (Wallace's rule).
//
// The functions below compute the stage sizes at elaboration time; they are
// also used at run time by the controllers to pick an entry stage. The two
// sequences are those of the described reduction methods; the engine enum
// is this implementation's naming of the units placed in cksum_top.
package cksum_pkg;

  localparam int unsigned W = 16;  // checksum word width
  typedef logic [W-1:0] word_t;

  typedef enum logic {
    LEVELED      = 1'b0,
    THREE_TO_TWO = 1'b1
  } reduce_method_e;

  // The checksum units side by side in cksum_top, as indices of its arrays.
  typedef enum logic [2:0] {
    E_SINGLE_LEV = 3'd0,  // single unit, leveled tree
    E_SINGLE_32  = 3'd1,  // single unit, 3-to-2 tree
    E_MULTI_LEV  = 3'd2,  // multiple units, leveled trees
    E_MULTI_32   = 3'd3,  // multiple units, 3-to-2 trees
    E_HYB_LEV    = 3'd4,  // hybrid, leveled M-to-k reducer
    E_HYB_32     = 3'd5   // hybrid, 3-to-2 M-to-k reducer
  } engine_e;
  localparam int unsigned NUM_ENGINES = 6;

  // Largest stage size of the leveled sequence strictly below x (x >= 3).
  function automatic int unsigned leveled_next(int unsigned x);
    int unsigned a;
    a = 2;
    while ((a * 3) / 2 < x) a = (a * 3) / 2;
    return a;
  endfunction

  // Next stage size of the 3-to-2 rule: ceil(2/3 * x).
  function automatic int unsigned three_to_two_next(int unsigned x);
    return x - x / 3;
  endfunction

  function automatic int unsigned next_rows(reduce_method_e m, int unsigned x);
    return (m == LEVELED) ? leveled_next(x) : three_to_two_next(x);
  endfunction

  // Number of reduction stages that take n rows down to k rows or fewer.
  function automatic int unsigned num_stages(reduce_method_e m, int unsigned n,
                                             int unsigned k);
    int unsigned x, s;
    x = n;
    s = 0;
    while (x > k) begin
      x = next_rows(m, x);
      s++;
    end
    return s;
  endfunction

  // Rows at the input of stage s (s = 0 is the input of the tree; s equal to
  // num_stages is its output).
  function automatic int unsigned stage_rows(reduce_method_e m, int unsigned n,
                                             int unsigned k, int unsigned s);
    int unsigned x;
    x = n;
    for (int unsigned i = 0; i < s; i++) begin
      if (x > k) x = next_rows(m, x);
    end
    return x;
  endfunction

  // Deepest stage of an n-row, 2-row-output tree that can still take `rows`
  // rows, i.e. the stage whose size is the smallest one >= rows. Rows placed
  // in slots 0 .. rows-1 may enter the tree there.
  function automatic int unsigned entry_stage(reduce_method_e m, int unsigned n,
                                              int unsigned k, int unsigned rows);
    int unsigned x, s;
    x = n;
    s = 0;
    while (x > k && next_rows(m, x) >= rows) begin
      x = next_rows(m, x);
      s++;
    end
    return s;
  endfunction

  // One's complement sum of two words with end-around carry.
  function automatic word_t oc_add(word_t a, word_t b);
    logic [W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[W-1:0] + word_t'(s[W]);
  endfunction

endpackage
