// tb_control_unit: self-checking test of the control unit.
// Random start pulses (single, back-to-back and with gaps). Checks that
// load_in follows start in the same cycle, load_out and busy are high
// exactly one cycle after a start, and done exactly two cycles after a start
// (the two-cycle latency); also that done counts match start counts.
module tb_control_unit;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic load_in, load_out, done, busy;
  logic s1 = 0, s2 = 0;          // start delayed by one and two cycles
  int starts = 0, dones = 0;

  control_unit u_dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s at %0t: got %b exp %b", what, $time, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 check("done in reset", done, 1'b0);
    check("busy in reset", busy, 1'b0);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      start = (k % 300 < 100) ? 1'b1 : 1'($urandom);   // long bursts, then random
      if (k >= 2990) start = 0;
      #1 check("load_in", load_in, start);
      check("load_out before edge", load_out, s1);
      check("busy before edge", busy, s1);
      @(posedge clk);
      s2 = s1; s1 = start;
      if (start) starts++;
      #1;
      check("load_out", load_out, s1);
      check("busy", busy, s1);
      check("done", done, s2);
      if (done) dones++;
    end
    checks++;
    if (starts != dones) begin
      failures++;
      $display("FAIL starts %0d dones %0d", starts, dones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
