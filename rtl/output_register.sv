// output_register: result register behind the multiplier datapath.
//
// How it works. A W-bit register captures the product on the rising clock
// edge when `load` is high and holds it otherwise, so the output stays
// steady and glitch-free between results.
//
// Interface: clk, rst_n (asynchronous, active low, clears the register),
// load, d -> q.
// Timing: q shows d from the edge at which load is sampled high.
//
// Storing the product in an output register follows the document; the load
// enable and reset are this design's choice.
module output_register #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
