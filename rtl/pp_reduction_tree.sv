// pp_reduction_tree: hybrid prefix-adder reduction layer of the multiplier.
//
// How it works. The N partial product rows are first placed at their weight
// (row r shifted left by r, zero-extended to 2N bits). They are then added
// pairwise in a binary tree of parallel prefix adders until two rows are
// left: level 1 turns N rows into N/2, level 2 into N/4, and so on, for
// log2(N) - 1 levels. The first HCA_LEVELS levels use Han-Carlson adders
// (sparse, few nodes, low wiring); the deeper levels use Knowles adders with
// fan-out list KA_FANOUT (balanced fan-out and delay). The carry out of every
// adder is zero, because each partial sum is bounded by the full product,
// which fits in 2N bits. For N = 8: 4 Han-Carlson adders, then 2 Knowles
// adders, leaving the two rows that the final adder sums.
//
// Interface: pp (N rows of N bits) -> row_a, row_b (2N bits each);
// row_a + row_b equals the sum of all weighted rows. Purely combinational.
// Timing: (log2(N) - 1) adder delays.
//
// Using Han-Carlson adders in the early stages and Knowles adders in the
// deeper ones follows the document. Reducing with a tree of two-input prefix
// adders (rather than carry-save compressors) and the 2N-bit adder width are
// this design's reading; the document gives no further detail of the tree.
module pp_reduction_tree
  import mul_pkg::*;
#(
  parameter int unsigned N          = 8,              // power of two, >= 4
  parameter int unsigned HCA_LEVELS = 1,              // early levels with Han-Carlson
  parameter fanout_t     KA_FANOUT  = KNOWLES_2_1_1   // Knowles list, deeper levels
) (
  input  logic [N-1:0][N-1:0] pp,
  output logic [2*N-1:0]      row_a,
  output logic [2*N-1:0]      row_b
);

  localparam int unsigned W = 2 * N;
  localparam int unsigned T = $clog2(N) - 1;   // tree levels down to two rows

  if (N < 4 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("pp_reduction_tree: N must be a power of two and at least 4");
  end

  logic [W-1:0] rows0 [N];

  for (genvar r = 0; r < N; r++) begin : g_place
    assign rows0[r] = W'(pp[r]) << r;
  end

  for (genvar t = 1; t <= T; t++) begin : g_lvl
    localparam int unsigned K = N >> t;        // adders on this level
    logic [W-1:0] prev [2*K];
    logic [W-1:0] sums [K];
    logic         couts [K];
    if (t == 1) begin : g_from_pp
      assign prev = rows0;
    end else begin : g_from_lvl
      assign prev = g_lvl[t-1].sums;
    end
    for (genvar k = 0; k < K; k++) begin : g_add
      if (t <= HCA_LEVELS) begin : g_hca
        hc_adder #(.WIDTH(W)) u_add (
          .a(prev[2*k]), .b(prev[2*k+1]), .cin(1'b0),
          .sum(sums[k]), .cout(couts[k]));
      end else begin : g_ka
        knowles_adder #(.WIDTH(W), .FANOUT(KA_FANOUT)) u_add (
          .a(prev[2*k]), .b(prev[2*k+1]), .cin(1'b0),
          .sum(sums[k]), .cout(couts[k]));
      end
    end
    // Every partial sum is bounded by the full product, so no adder of the
    // tree may carry out of bit 2N-1.
    always_comb begin
      for (int k = 0; k < int'(K); k++)
        a_no_overflow: assert (couts[k] == 1'b0)
          else $error("pp_reduction_tree: adder overflow on level %0d", t);
    end
  end

  assign row_a = g_lvl[T].sums[0];
  assign row_b = g_lvl[T].sums[1];

endmodule
