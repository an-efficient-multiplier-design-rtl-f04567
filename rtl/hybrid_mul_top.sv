// hybrid_mul_top: registered N x N unsigned multiplier with hybrid
// Han-Carlson / Knowles prefix adders.
//
// How it works. A start pulse loads operands a and b into the input register
// bank. The combinational core behind it forms the AND partial products,
// reduces them with a tree of prefix adders (Han-Carlson on the early level,
// Knowles deeper) to two rows, and resolves the carries with the hybrid
// Han-Carlson/Knowles final adder. On the next clock edge the output
// register stores the product and the control unit raises done for one
// cycle. The product stays on the output until the next result is stored.
//
// Interface: clk, rst_n (asynchronous, active low), start, a, b ->
// product (2N bits), done, busy.
// Timing: a and b are sampled at the edge where start is high; product and
// done are valid after the second edge (latency 2 cycles); one operation can
// start every cycle. The whole datapath is a single combinational stage.
//
// The block structure (input register bank, partial product layer, hybrid
// reduction layer, final adder stage, output register, control unit) and the
// 8x8 size follow the document; the start/done handshake is this design's.
module hybrid_mul_top
  import mul_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter int unsigned HCA_LEVELS = 1,
  parameter fanout_t     KA_FANOUT  = KNOWLES_2_1_1,
  parameter fanout_t     CPA_FANOUT = KNOWLES_2_1_1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] product,
  output logic           done,
  output logic           busy
);

  logic           load_in, load_out;
  logic [N-1:0]   a_q, b_q;
  logic [2*N-1:0] product_d;

  control_unit u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start),
    .load_in(load_in), .load_out(load_out), .done(done), .busy(busy));

  input_register_bank #(.N(N)) u_in (
    .clk(clk), .rst_n(rst_n), .load(load_in),
    .a_in(a), .b_in(b), .a_q(a_q), .b_q(b_q));

  hybrid_mul_core #(
    .N(N), .HCA_LEVELS(HCA_LEVELS), .KA_FANOUT(KA_FANOUT), .CPA_FANOUT(CPA_FANOUT)
  ) u_core (
    .a(a_q), .b(b_q), .product(product_d));

  output_register #(.W(2*N)) u_out (
    .clk(clk), .rst_n(rst_n), .load(load_out), .d(product_d), .q(product));

endmodule
