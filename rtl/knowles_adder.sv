// knowles_adder: Knowles parallel prefix adder, WIDTH bits plus carry in.
//
// How it works. Every bit forms its generate/propagate pair (carry in folded
// into bit 0). log2(WIDTH) dense prefix levels follow; on level l (span
// s = 2^(l-1)) every node i >= s joins its own span with the span of node
//   j = floor((i - s) / f) * f + f - 1,
// where f is the fan-out of that level. With f = 1 this is Kogge-Stone
// (j = i - s); a larger f lets f neighbouring nodes share one source node,
// so the spans may overlap (the prefix operator is idempotent) and the
// number of long wires drops. FANOUT lists the fan-outs in Knowles' order,
// last level first; the default [2,1,1] is the classic Knowles adder with
// fan-out 2 on its last level. An elaboration check rejects lists that do
// not give every node its full prefix.
//
// Interface: a, b, cin -> sum, cout. Purely combinational, no clock.
// Timing: log2(WIDTH) prefix levels plus the XOR stage, for every FANOUT.
//
// The document describes the Knowles adder as a balanced parallel prefix
// tree with controllable fan-out; the source-node rule and the default list
// are this design's choice. The 8-bit default follows the bit numbering and
// the output spans 7:0 ... 0:0 printed in its figure.
module knowles_adder
  import mul_pkg::*;
#(
  parameter int unsigned WIDTH  = 8,
  parameter fanout_t     FANOUT = KNOWLES_2_1_1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned L = (WIDTH > 1) ? $clog2(WIDTH) : 0;

  if (!knowles_valid(WIDTH, FANOUT)) begin : g_bad_fanout
    $error("knowles_adder: FANOUT does not form a complete prefix network");
  end

  gp_t bit_gp [WIDTH];      // pre-processing
  gp_t fin    [WIDTH];      // prefix [i:0] of every bit
  logic [WIDTH:0] carry;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    if (i == 0) begin : g_lsb
      assign bit_gp[i].g = (a[i] & b[i]) | ((a[i] ^ b[i]) & cin);
    end else begin : g_rest
      assign bit_gp[i].g = a[i] & b[i];
    end
    assign bit_gp[i].p = a[i] ^ b[i];
  end

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    localparam int SPAN = 1 << (l - 1);
    localparam int F    = level_fanout(FANOUT, L, l);
    gp_t prev [WIDTH];
    gp_t nd   [WIDTH];
    if (l == 1) begin : g_from_bits
      assign prev = bit_gp;
    end else begin : g_from_lvl
      assign prev = g_lvl[l-1].nd;
    end
    for (genvar i = 0; i < WIDTH; i++) begin : g_node
      if (i >= SPAN) begin : g_op
        assign nd[i] = gp_combine(prev[i], prev[knowles_src(i, SPAN, F)]);
      end else begin : g_buf
        assign nd[i] = prev[i];
      end
    end
  end

  if (L == 0) begin : g_fin0
    assign fin = bit_gp;
  end else begin : g_fin
    assign fin = g_lvl[L].nd;
  end

  assign carry[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_sum
    assign carry[i+1] = fin[i].g;
    assign sum[i]     = bit_gp[i].p ^ carry[i];
  end
  assign cout = carry[WIDTH];

endmodule
