// tb_hc_adder: self-checking test of the Han-Carlson adder.
// The 8-bit default instance is checked exhaustively (all a, b, cin); a
// 16-bit and a 32-bit instance are checked on random and corner operands.
// Reference: the built-in + operator. Combinational, one check per vector.
module tb_hc_adder;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;    logic cin8, co8;
  logic [15:0] a16, b16, s16; logic cin16, co16;
  logic [31:0] a32, b32, s32; logic cin32, co32;

  hc_adder u8 (.a(a8), .b(b8), .cin(cin8), .sum(s8), .cout(co8));
  hc_adder #(.WIDTH(16)) u16 (.a(a16), .b(b16), .cin(cin16), .sum(s16), .cout(co16));
  hc_adder #(.WIDTH(32)) u32 (.a(a32), .b(b32), .cin(cin32), .sum(s32), .cout(co32));

  task automatic check(string what, logic [32:0] got, logic [32:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0; cin16 = 0; a32 = '0; b32 = '0; cin32 = 0;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(x); b8 = 8'(y); cin8 = c[0];
          #1 check("w8", {24'd0, co8, s8}, 33'(x + y + c));
        end
    for (int k = 0; k < 20000; k++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); cin16 = 1'($urandom);
      a32 = $urandom; b32 = $urandom; cin32 = 1'($urandom);
      if (k < 4) begin   // carry chains through every bit
        a16 = '1; b16 = 16'(k); a32 = '1; b32 = 32'(k); cin16 = k[1]; cin32 = k[1];
      end
      #1;
      check("w16", {16'd0, co16, s16}, 33'(a16) + 33'(b16) + 33'(cin16));
      check("w32", {co32, s32}, 33'(a32) + 33'(b32) + 33'(cin32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
