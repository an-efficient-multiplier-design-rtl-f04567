// tb_input_register_bank: self-checking test of the operand registers.
// Random operands and random load pulses; after every clock edge the
// outputs must equal a reference model that captures on load, holds
// otherwise and clears on reset (also applied once in the middle).
module tb_input_register_bank;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  logic [7:0] a_in = '0, b_in = '0, a_q, b_q, exp_a, exp_b;

  input_register_bank u_dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_a = '0; exp_b = '0;
    repeat (2) @(posedge clk);
    #1 checks++; if (a_q !== 8'd0 || b_q !== 8'd0) failures++;
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      a_in = 8'($urandom); b_in = 8'($urandom); load = 1'($urandom);
      if (k == 1000) rst_n = 0;
      if (k == 1002) rst_n = 1;
      @(posedge clk);
      if (!rst_n) begin exp_a = '0; exp_b = '0; end
      else if (load) begin exp_a = a_in; exp_b = b_in; end
      #1;
      checks++;
      if (a_q !== exp_a || b_q !== exp_b) begin
        failures++;
        if (failures <= 10) $display("FAIL k=%0d got %h %h exp %h %h", k, a_q, b_q, exp_a, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
