// tb_hybrid_mul_top: end-to-end test of the registered 8x8 hybrid
// multiplier at its default parameters.
//
// All 65536 operand pairs are issued once, in a scrambled order, with a mix
// of back-to-back starts and idle gaps, while a and b are scrambled on idle
// cycles. A scoreboard queues a * b for every start; each done must arrive
// exactly two cycles after its start and carry the queued product. On idle
// cycles the product must hold its last value. A reset is applied once in
// the middle of the run. Mechanisms counted (each must occur): operand
// loads, back-to-back operations, idle cycles with held output, products
// that need a carry into the top bit, and the mid-run reset.
module tb_hybrid_mul_top;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0]  a = '0, b = '0;
  logic [15:0] product, last_product;
  logic        done, busy;

  int unsigned n_load = 0, n_b2b = 0, n_hold = 0, n_topbit = 0, n_reset = 0;
  logic [15:0] expq [$];
  logic        s1 = 0, s2 = 0;   // start one and two cycles ago

  hybrid_mul_top u_dut (.*);

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    if (failures <= 10) $display("FAIL at %0t: %s", $time, msg);
  endtask

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned idx = 0;
    logic prev_start = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    last_product = '0;
    while (idx < 65536 || expq.size() != 0 || s1 || s2) begin
      @(negedge clk);
      // Mid-run reset: flush in-flight work, then resume.
      if (idx == 30000 && n_reset == 0) begin
        rst_n = 0; start = 0; n_reset++;
        expq.delete(); s1 = 0; s2 = 0;
        @(negedge clk);
        checks++;
        if (product !== 16'd0 || done !== 1'b0) fail("reset did not clear outputs");
        last_product = '0;
        rst_n = 1;
        idx++;            // the pair dropped by the reset is skipped
        continue;
      end
      if (idx < 65536 && ($urandom_range(0, 3) != 0)) begin
        // scramble the order: odd multiplier walks the full 16-bit space
        logic [15:0] pair;
        pair = 16'(idx * 40503);
        a = pair[7:0]; b = pair[15:8];
        start = 1;
        expq.push_back(16'(a) * 16'(b));
        n_load++;
        if (prev_start) n_b2b++;
        idx++;
      end else begin
        start = 0;
        a = 8'($urandom); b = 8'($urandom);   // must not disturb anything
      end
      prev_start = start;
      @(posedge clk);
      s2 = s1; s1 = start;
      #1;
      checks++;
      if (done !== s2) fail($sformatf("done=%b, expected %b (latency 2)", done, s2));
      if (done) begin
        logic [15:0] e;
        e = expq.pop_front();
        checks++;
        if (product !== e) fail($sformatf("product %h, expected %h", product, e));
        if (product[15]) n_topbit++;
        last_product = product;
      end else begin
        checks++;
        if (product !== last_product) fail("product changed without done");
        n_hold++;
      end
    end
    $display("mechanisms: loads=%0d back_to_back=%0d idle_holds=%0d top_bit_carries=%0d resets=%0d",
             n_load, n_b2b, n_hold, n_topbit, n_reset);
    checks++; if (n_load   == 0) fail("no operand load");
    checks++; if (n_b2b    == 0) fail("no back-to-back operation");
    checks++; if (n_hold   == 0) fail("no idle hold");
    checks++; if (n_topbit == 0) fail("no product with the top bit set");
    checks++; if (n_reset  == 0) fail("no mid-run reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
