// wallace_pkg - reduction schedule of the compressor-based Wallace tree.
//
// The multiplier's partial-product matrix is reduced column by column. At
// each stage every column of height h is covered, from its lowest bit up,
// by:
//   * as many 7-input compressors (compressor_5_2) as fit,
//   * one 5-input compressor (compressor_4_2) if 4 to 6 bits remain
//     (with 4 bits its fifth input is tied to 0),
//   * one full adder if exactly 3 bits remain,
//   * one half adder if 2 bits remain and the column also receives carries
//     from lower columns in this stage (otherwise they pass unchanged),
//   * a column that already has at most 2 bits and receives no carries is
//     passed through untouched.
// The next stage's column j holds, in this order: the bits passed through,
// the sums of column j's counters, the carries of column j-1's counters and
// the couts (weight +2) of column j-2's 7- and 5-input compressors.
// The stages continue until no column holds more than two bits. For 8x8 this
// takes three stages; the 8-bit middle column gets one 7-input compressor and
// promotes its eighth bit unchanged, which is the allocation of the original
// design; the rule for the other columns is this implementation's choice.
//
// The functions here describe one column; wallace_tree applies them to all
// columns and stages once, at elaboration, to build its schedule table.
package wallace_pkg;

  // How one column of one stage is reduced (fields are small counts).
  typedef struct packed {
    logic [7:0] height;  // bits in the column at this stage
    logic [7:0] n73;     // 7-input compressors (compressor_5_2)
    logic [7:0] n53;     // 5-input compressors (compressor_4_2)
    logic [7:0] in53;    // inputs used by the 5-input compressor (4 or 5), 0 if none
    logic [7:0] nfa;     // full adders
    logic [7:0] nha;     // half adders
    logic [7:0] pass;    // bits passed to the next stage unchanged
  } col_plan_t;

  // Number of counters in a column; each produces one sum and one carry.
  function automatic int n_counters(col_plan_t p);
    return int'(p.n73) + int'(p.n53) + int'(p.nfa) + int'(p.nha);
  endfunction

  // Counters whose third output (cout) goes two columns up.
  function automatic int n_couts(col_plan_t p);
    return int'(p.n73) + int'(p.n53);
  endfunction

  // Bits of the column consumed by counters (passed bits sit above them).
  function automatic int n_used(col_plan_t p);
    return 7 * int'(p.n73) + int'(p.in53) + 3 * int'(p.nfa) + 2 * int'(p.nha);
  endfunction

  // Counter allocation for one column of height h that receives cin bits
  // from lower columns' counters in the same stage.
  function automatic col_plan_t allocate(int h, int cin);
    col_plan_t p;
    int r;
    p = '0;
    p.height = 8'(h);
    if (h <= 1 || (h == 2 && cin == 0)) begin
      p.pass = 8'(h);
    end else if (h == 2) begin
      p.nha = 8'd1;
    end else begin
      p.n73 = 8'(h / 7);
      r = h % 7;
      if (r >= 4) begin
        p.n53  = 8'd1;
        p.in53 = (r >= 5) ? 8'd5 : 8'd4;
        r -= int'(p.in53);
      end
      if (r == 3) begin
        p.nfa = 8'd1;
        r = 0;
      end
      if (r == 2 && cin > 0) begin
        p.nha = 8'd1;
        r = 0;
      end
      p.pass = 8'(r);
    end
    return p;
  endfunction

  // Height of column j of the partial-product matrix of an n x n multiply.
  function automatic int initial_height(int n, int j);
    if (j < 0 || j >= 2 * n - 1) return 0;
    return (j + 1 < 2 * n - 1 - j) ? j + 1 : 2 * n - 1 - j;
  endfunction

endpackage
