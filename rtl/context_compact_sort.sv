// context_compact_sort (CCS): merges and sorts three paths in one cycle.
//
// Inputs are the two paths a and b produced by the branch/memory unit from
// the active path, and the path c read from the second hot context table.
// Paths with the same PC and call depth are merged (their masks are ORed),
// and the 1 to 3 distinct paths that remain come out in priority order
// x < y < z (deepest call depth first, then smallest PC), packed towards x;
// unused outputs are invalid.
//
// As in the original description, this is a latency-oriented circuit rather than
// a sorting network: order and equality comparators between all three pairs
// work in parallel, and each output is a 3-input one-hot multiplexer whose
// selects are boolean functions of the comparator results. How a merged
// group is represented (by its first member in a, b, c order) is this
// design's choice. Purely combinational.
module context_compact_sort
  import path_pkg::*;
(
  input  path_t a,
  input  path_t b,
  input  path_t c,
  output path_t x,
  output path_t y,
  output path_t z,
  output logic [1:0] merges   // number of inputs folded into another one
);

  // All-pairs comparators.
  logic eq_ab, eq_ac, eq_bc;
  logic lt_ab, lt_ac, lt_bc, lt_ba, lt_ca, lt_cb;

  assign eq_ab = path_eq(a, b);
  assign eq_ac = path_eq(a, c);
  assign eq_bc = path_eq(b, c);
  assign lt_ab = path_lt(a, b);
  assign lt_ba = path_lt(b, a);
  assign lt_ac = path_lt(a, c);
  assign lt_ca = path_lt(c, a);
  assign lt_bc = path_lt(b, c);
  assign lt_cb = path_lt(c, b);

  // Compaction: which inputs survive as group representatives, and the
  // merged masks.
  logic  keep_a, keep_b, keep_c;
  path_t ma, mb, mc;

  always_comb begin
    keep_a = a.valid;
    keep_b = b.valid && !eq_ab;
    keep_c = c.valid && !eq_ac && !eq_bc;

    ma = a;
    mb = b;
    mc = c;
    ma.mask = a.mask | (eq_ab ? b.mask : '0) | (eq_ac ? c.mask : '0);
    mb.mask = b.mask | ((eq_bc && !eq_ab) ? c.mask : '0);
    ma.valid = keep_a;
    mb.valid = keep_b;
    mc.valid = keep_c;

    merges = 2'(((b.valid && !keep_b) ? 1 : 0) + ((c.valid && !keep_c) ? 1 : 0));
  end

  // Rank of each surviving representative = number of survivors before it.
  // Survivors have distinct keys, so strict comparisons are enough; a
  // non-surviving input gets rank 3 and is selected by no output.
  logic [1:0] rank_a, rank_b, rank_c;

  always_comb begin
    rank_a = keep_a ? 2'((keep_b && lt_ba) + (keep_c && lt_ca)) : 2'd3;
    rank_b = keep_b ? 2'((keep_a && lt_ab) + (keep_c && lt_cb)) : 2'd3;
    rank_c = keep_c ? 2'((keep_a && lt_ac) + (keep_b && lt_bc)) : 2'd3;
  end

  // Three-input one-hot multiplexers.
  function automatic path_t sel3(logic sa, logic sb, logic sc,
                                 path_t pa, path_t pb, path_t pc_);
    return (sa ? pa : PATH_NONE) | (sb ? pb : PATH_NONE) | (sc ? pc_ : PATH_NONE);
  endfunction

  assign x = sel3(rank_a == 2'd0, rank_b == 2'd0, rank_c == 2'd0, ma, mb, mc);
  assign y = sel3(rank_a == 2'd1, rank_b == 2'd1, rank_c == 2'd1, ma, mb, mc);
  assign z = sel3(rank_a == 2'd2, rank_b == 2'd2, rank_c == 2'd2, ma, mb, mc);

endmodule
