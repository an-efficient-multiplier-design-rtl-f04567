// control_unit: control and synchronization unit of the multiplier.
//
// How it works. The multiplier has two register stages: the input register
// bank and the output register, with the combinational datapath (partial
// products, hybrid reduction, final carry resolution) between them. The
// control unit tracks one valid bit per stage. A high `start` loads the
// operands (load_in); one cycle later the stage-1 valid bit loads the
// product into the output register (load_out); one cycle after that `done`
// is high for one cycle while the new product is on the output. Registers
// are only enabled when they hold a new operation, so idle cycles cause no
// switching in the datapath. A new operation may start every cycle.
//
// Interface: clk, rst_n (asynchronous, active low), start ->
// load_in, load_out, done, busy (an operation is in flight).
// Timing: done rises 2 clock edges after the edge that samples start;
// throughput one operation per cycle.
//
// The document gives the unit's purpose (correct timing, glitch-free
// operation, sequencing input loading, computation and result storage); the
// valid-bit pipeline and its timing are this design's choice.
module control_unit (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic load_in,
  output logic load_out,
  output logic done,
  output logic busy
);

  logic operands_valid;   // input registers hold an operation not yet stored

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      operands_valid <= 1'b0;
      done           <= 1'b0;
    end else begin
      operands_valid <= start;
      done           <= operands_valid;
    end
  end

  assign load_in  = start;
  assign load_out = operands_valid;
  assign busy     = operands_valid;

  // Every result strobe stems from a start two cycles earlier.
  a_done_follows_start: assert property (
    @(posedge clk) disable iff (!rst_n) done |-> $past(start, 2))
    else $error("control_unit: done without a start two cycles earlier");

endmodule
