// tb_output_register: self-checking test of the result register.
// Random data and random load pulses; after every clock edge q must equal a
// reference model that captures on load, holds otherwise and clears on
// reset (also applied once in the middle).
module tb_output_register;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  logic [15:0] d = '0, q, exp_q;

  output_register u_dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_q = '0;
    repeat (2) @(posedge clk);
    #1 checks++; if (q !== 16'd0) failures++;
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      d = 16'($urandom); load = 1'($urandom);
      if (k == 1000) rst_n = 0;
      if (k == 1002) rst_n = 1;
      @(posedge clk);
      if (!rst_n) exp_q = '0;
      else if (load) exp_q = d;
      #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        if (failures <= 10) $display("FAIL k=%0d got %h exp %h", k, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
