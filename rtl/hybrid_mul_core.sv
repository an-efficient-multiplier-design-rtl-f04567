// hybrid_mul_core: combinational N x N unsigned multiplier datapath built
// from hybrid prefix adders.
//
// How it works. pp_generator forms the N x N AND matrix, pp_reduction_tree
// adds the weighted rows pairwise (Han-Carlson adders on the first level,
// Knowles adders deeper) down to two rows, and hybrid_adder, a Han-Carlson
// skeleton with a Knowles inner tree, adds those two rows into the 2N-bit
// product. Its carry out is always zero.
//
// Interface: a, b (N bits) -> product (2N bits). For N = 8 that is 32 I/O
// pins and no clock. Purely combinational; wrap it in registers
// (hybrid_mul_top) for a clocked design.
//
// The three-phase flow (AND partial products, hybrid HCA/KA reduction,
// hybrid HCA-KA final carry-propagate adder) and the 8x8 size follow the
// document. The parameters that split the adders are this design's choice.
module hybrid_mul_core
  import mul_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter int unsigned HCA_LEVELS = 1,
  parameter fanout_t     KA_FANOUT  = KNOWLES_2_1_1,
  parameter fanout_t     CPA_FANOUT = KNOWLES_2_1_1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] product
);

  logic [N-1:0][N-1:0] pp;
  logic [2*N-1:0]      row_a, row_b;
  logic                cout;

  pp_generator #(.N(N)) u_ppg (
    .a(a), .b(b), .pp(pp));

  pp_reduction_tree #(.N(N), .HCA_LEVELS(HCA_LEVELS), .KA_FANOUT(KA_FANOUT)) u_red (
    .pp(pp), .row_a(row_a), .row_b(row_b));

  hybrid_adder #(.WIDTH(2*N), .FANOUT(CPA_FANOUT)) u_cpa (
    .a(row_a), .b(row_b), .cin(1'b0), .sum(product), .cout(cout));

  // The product of two N-bit numbers fits in 2N bits.
  always_comb a_no_cpa_overflow: assert (cout == 1'b0)
    else $error("hybrid_mul_core: final adder overflowed");

endmodule
