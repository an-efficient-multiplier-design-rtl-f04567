// mul_pkg: types and elaboration-time helpers shared by the parallel prefix
// adders and the hybrid multiplier.
//
// gp_t is the (generate, propagate) pair that every prefix node works on, and
// gp_combine() is the prefix operator "o":
//   (G,P)[i:k] = (G[i:j] | P[i:j] & G[j-1:k],  P[i:j] & P[j-1:k]).
// The operator is associative and idempotent, so the two spans it joins may
// also overlap; the Knowles networks rely on that.
//
// fanout_t holds the fan-out list of a Knowles network in Knowles' own order:
// element [0] is the fan-out of the LAST prefix level, [1] of the level before
// it, and so on. A list of all ones is a Kogge-Stone network. knowles_src()
// gives the node a level-l node reads from, knowles_valid() replays a network
// at elaboration time and reports whether every node ends up covering bit 0.
package mul_pkg;

  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  localparam int unsigned MAX_LEVELS = 8;   // networks up to 256 nodes
  typedef logic [MAX_LEVELS-1:0][7:0] fanout_t;

  // Knowles [2,1,1,...]: fan-out 2 on the last level, 1 everywhere else.
  localparam fanout_t KNOWLES_2_1_1 = {{(MAX_LEVELS-1){8'd1}}, 8'd2};
  // Kogge-Stone: fan-out 1 on every level.
  localparam fanout_t FANOUT_ALL_ONE = {MAX_LEVELS{8'd1}};

  function automatic gp_t gp_combine(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Source node of node i on a level whose span is `span` and fan-out `f`.
  function automatic int knowles_src(int i, int span, int f);
    return ((i - span) / f) * f + (f - 1);
  endfunction

  // Fan-out of level l (1 = first) in a network of `levels` levels.
  function automatic int level_fanout(fanout_t fl, int levels, int l);
    return int'(fl[levels - l]);
  endfunction

  // True when a Knowles network of n nodes with fan-out list fl computes the
  // full prefix [i:0] at every node, joining only abutting or overlapping spans.
  function automatic bit knowles_valid(int n, fanout_t fl);
    int lo  [256];
    int nlo [256];
    int levels;
    levels = (n > 1) ? $clog2(n) : 0;
    if (n > 256 || levels > MAX_LEVELS) return 1'b0;
    for (int i = 0; i < n; i++) lo[i] = i;
    for (int l = 1; l <= levels; l++) begin
      int span;
      int f;
      span = 1 << (l - 1);
      f    = level_fanout(fl, levels, l);
      if (f < 1 || f > span) return 1'b0;
      for (int i = 0; i < n; i++) begin
        nlo[i] = lo[i];
        if (i >= span) begin
          int j;
          j = knowles_src(i, span, f);
          if (j >= i || j < 0) return 1'b0;
          if (lo[i] > j + 1) return 1'b0;   // gap between the two spans
          nlo[i] = (lo[j] < lo[i]) ? lo[j] : lo[i];
        end
      end
      for (int i = 0; i < n; i++) lo[i] = nlo[i];
    end
    for (int i = 0; i < n; i++) if (lo[i] != 0) return 1'b0;
    return 1'b1;
  endfunction

endpackage
