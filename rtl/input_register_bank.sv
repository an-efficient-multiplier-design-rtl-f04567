// input_register_bank: operand registers in front of the multiplier.
//
// How it works. Two N-bit registers capture operands A and B on the rising
// clock edge when `load` is high and hold them otherwise, so the datapath
// behind them only switches when a new operation is started.
//
// Interface: clk, rst_n (asynchronous, active low, clears both registers),
// load, a_in, b_in -> a_q, b_q.
// Timing: a_q/b_q show the operands from the edge after load is sampled.
//
// Storing A and B in an input register bank to steady the inputs and cut
// switching follows the document; load enable and reset are this design's
// choice.
module input_register_bank #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] a_in,
  input  logic [N-1:0] b_in,
  output logic [N-1:0] a_q,
  output logic [N-1:0] b_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else if (load) begin
      a_q <= a_in;
      b_q <= b_in;
    end
  end

endmodule
