// hybrid_adder: hybrid Han-Carlson / Knowles parallel prefix adder, used as
// the final carry-propagate adder of the multiplier.
//
// How it works. The outer skeleton is Han-Carlson: a sparse first row joins
// every odd bit with the even bit below it, so only WIDTH/2 nodes enter the
// prefix tree (fewer nodes), and a last row finishes the even bits. The tree
// over those WIDTH/2 odd nodes is a Knowles network with fan-out list
// FANOUT (last level first). With the default [2,1,1] the early tree levels
// have fan-out 1 and are exactly the Han-Carlson levels, while the deepest
// level shares one source between two neighbouring nodes as in a Knowles
// adder, which halves its long wires and evens out the loading. A list of all
// ones turns the block into a plain Han-Carlson adder.
//
// Interface: a, b, cin -> sum, cout. Purely combinational, no clock.
// Timing: log2(WIDTH) + 1 prefix levels plus the XOR stage.
//
// The split (Han-Carlson in the early prefix levels to cut node count,
// Knowles in the deeper levels for balanced fan-out and delay) follows the
// document; how the two are joined, and the fan-out list, are this design's
// choice. WIDTH defaults to 16, the product width of the 8x8 multiplier.
module hybrid_adder
  import mul_pkg::*;
#(
  parameter int unsigned WIDTH  = 16,            // must be even and at least 2
  parameter fanout_t     FANOUT = KNOWLES_2_1_1  // Knowles list of the inner tree
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned M = WIDTH / 2;
  localparam int unsigned L = (M > 1) ? $clog2(M) : 0;

  if (WIDTH < 2 || (WIDTH % 2) != 0) begin : g_bad_width
    $error("hybrid_adder: WIDTH must be even and at least 2");
  end
  if (!knowles_valid(M, FANOUT)) begin : g_bad_fanout
    $error("hybrid_adder: FANOUT does not form a complete prefix network");
  end

  gp_t bit_gp [WIDTH];
  gp_t row0   [M];
  gp_t fin    [M];          // complete prefix of the odd nodes
  gp_t pre    [WIDTH];
  logic [WIDTH:0] carry;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    if (i == 0) begin : g_lsb
      assign bit_gp[i].g = (a[i] & b[i]) | ((a[i] ^ b[i]) & cin);
    end else begin : g_rest
      assign bit_gp[i].g = a[i] & b[i];
    end
    assign bit_gp[i].p = a[i] ^ b[i];
  end

  // Han-Carlson sparse first row.
  for (genvar m = 0; m < M; m++) begin : g_row0
    assign row0[m] = gp_combine(bit_gp[2*m+1], bit_gp[2*m]);
  end

  // Knowles tree over the odd nodes.
  for (genvar l = 1; l <= L; l++) begin : g_lvl
    localparam int SPAN = 1 << (l - 1);
    localparam int F    = level_fanout(FANOUT, L, l);
    gp_t prev [M];
    gp_t nd   [M];
    if (l == 1) begin : g_from_row0
      assign prev = row0;
    end else begin : g_from_lvl
      assign prev = g_lvl[l-1].nd;
    end
    for (genvar m = 0; m < M; m++) begin : g_node
      if (m >= SPAN) begin : g_op
        assign nd[m] = gp_combine(prev[m], prev[knowles_src(m, SPAN, F)]);
      end else begin : g_buf
        assign nd[m] = prev[m];
      end
    end
  end

  if (L == 0) begin : g_fin0
    assign fin = row0;
  end else begin : g_fin
    assign fin = g_lvl[L].nd;
  end

  // Han-Carlson last row.
  for (genvar i = 0; i < WIDTH; i++) begin : g_post
    if (i % 2 == 1) begin : g_odd
      assign pre[i] = fin[i/2];
    end else if (i == 0) begin : g_zero
      assign pre[i] = bit_gp[0];
    end else begin : g_even
      assign pre[i] = gp_combine(bit_gp[i], fin[i/2 - 1]);
    end
  end

  assign carry[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_sum
    assign carry[i+1] = pre[i].g;
    assign sum[i]     = bit_gp[i].p ^ carry[i];
  end
  assign cout = carry[WIDTH];

endmodule
