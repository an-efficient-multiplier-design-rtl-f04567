// tb_hybrid_mul_core: self-checking test of the combinational 8x8
// multiplier datapath. Every one of the 65536 operand pairs is applied and
// the product compared with a * b; a 16x16 instance is checked on random
// and extreme operands.
module tb_hybrid_mul_core;
  int checks = 0, failures = 0;
  logic [7:0]  a, b;
  logic [15:0] p;
  logic [15:0] a16, b16;
  logic [31:0] p16;

  hybrid_mul_core u_dut (.a(a), .b(b), .product(p));
  hybrid_mul_core #(.N(16)) u_16 (.a(a16), .b(b16), .product(p16));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a = 8'(x); b = 8'(y);
        #1;
        checks++;
        if (p !== 16'(x * y)) begin
          failures++;
          if (failures <= 10) $display("FAIL %0d*%0d = %0d", x, y, p);
        end
      end
    for (int k = 0; k < 20000; k++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (k == 0) begin a16 = '1; b16 = '1; end
      #1;
      checks++;
      if (p16 !== 32'(a16) * 32'(b16)) begin
        failures++;
        if (failures <= 10) $display("FAIL16 %0d*%0d = %0d", a16, b16, p16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
