// hc_adder: Han-Carlson parallel prefix adder, WIDTH bits plus carry in.
//
// How it works. Bit-level generate/propagate pairs are formed first (carry in
// folded into bit 0). A sparse first prefix row joins every odd bit with the
// even bit below it, so only WIDTH/2 nodes (the odd positions) enter the
// prefix tree. Those nodes run a Kogge-Stone tree (spans 1, 2, 4, ... over the
// odd nodes, fan-out 1). A last row finishes each even bit by joining it with
// the complete prefix of the odd bit below. The logic depth is
// log2(WIDTH) + 1 prefix levels, every node drives at most two others, and the
// tree has half the nodes of a Kogge-Stone adder. The sums are p_i ^ c_i.
//
// Interface: a, b, cin -> sum, cout. Purely combinational, no clock.
// Timing: one pass through log2(WIDTH) + 1 prefix levels plus the XOR stage.
//
// The structure (pre-processing, sparse prefix computation on every second
// bit, post-processing; depth log2(n)+1, fan-out <= 2) follows the text that
// describes the adder; the 8-bit default follows the bit numbering 7..0 of
// its figure. Taking the odd positions (0-based) as the ones that carry the
// tree is this design's reading of "only even-indexed bits" counted from 1.
module hc_adder
  import mul_pkg::*;
#(
  parameter int unsigned WIDTH = 8   // must be even and at least 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned M = WIDTH / 2;                 // nodes in the tree
  localparam int unsigned L = (M > 1) ? $clog2(M) : 0;   // tree levels

  if (WIDTH < 2 || (WIDTH % 2) != 0) begin : g_bad_width
    $error("hc_adder: WIDTH must be even and at least 2");
  end

  gp_t bit_gp [WIDTH];        // pre-processing
  gp_t row0   [M];          // sparse first row (odd nodes)
  gp_t fin    [M];          // complete prefix of the odd nodes
  gp_t pre    [WIDTH];        // prefix [i:0] of every bit
  logic [WIDTH:0] carry;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    if (i == 0) begin : g_lsb
      assign bit_gp[i].g = (a[i] & b[i]) | ((a[i] ^ b[i]) & cin);
    end else begin : g_rest
      assign bit_gp[i].g = a[i] & b[i];
    end
    assign bit_gp[i].p = a[i] ^ b[i];
  end

  // Sparse first row: odd bit 2m+1 absorbs even bit 2m.
  for (genvar m = 0; m < M; m++) begin : g_row0
    assign row0[m] = gp_combine(bit_gp[2*m+1], bit_gp[2*m]);
  end

  // Kogge-Stone over the odd nodes.
  for (genvar l = 1; l <= L; l++) begin : g_lvl
    gp_t prev [M];
    gp_t nd   [M];
    if (l == 1) begin : g_from_row0
      assign prev = row0;
    end else begin : g_from_lvl
      assign prev = g_lvl[l-1].nd;
    end
    for (genvar m = 0; m < M; m++) begin : g_node
      if (m >= (1 << (l - 1))) begin : g_op
        assign nd[m] = gp_combine(prev[m], prev[m - (1 << (l - 1))]);
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

  // Post-processing: even bits take the finished prefix of the odd bit below.
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
