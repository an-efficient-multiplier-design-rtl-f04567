// tb_pp_generator: self-checking test of the AND partial product array.
// For every pair of 8-bit operands each of the 64 matrix bits is compared
// with a[c] & b[r], and the weighted row sum with a * b.
module tb_pp_generator;
  int checks = 0, failures = 0;
  logic [7:0] a, b;
  logic [7:0][7:0] pp;

  pp_generator u_dut (.a(a), .b(b), .pp(pp));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        int acc;
        a = 8'(x); b = 8'(y);
        #1;
        acc = 0;
        for (int r = 0; r < 8; r++) begin
          for (int c = 0; c < 8; c++) begin
            checks++;
            if (pp[r][c] !== (((x >> c) & (y >> r)) & 1) != 0) failures++;
          end
          acc += int'(pp[r]) << r;
        end
        checks++;
        if (acc != x * y) begin
          failures++;
          if (failures <= 10) $display("FAIL %0d*%0d: rows sum to %0d", x, y, acc);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
