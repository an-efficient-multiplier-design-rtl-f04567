// tb_hybrid_adder: self-checking test of the hybrid Han-Carlson/Knowles
// adder. The default 16-bit instance is checked on all sums of two 8-bit
// shifted operands plus random and carry-chain operands; an 8-bit instance
// is checked exhaustively and a 32-bit instance with a plain Han-Carlson
// list (all ones) on random operands. Reference: the built-in + operator.
module tb_hybrid_adder;
  import mul_pkg::*;
  int checks = 0, failures = 0;

  logic [15:0] a, b, s;     logic cin, co;
  logic [7:0]  a8, b8, s8;  logic cin8, co8;
  logic [31:0] a32, b32, s32; logic co32;

  hybrid_adder u16 (.a(a), .b(b), .cin(cin), .sum(s), .cout(co));
  hybrid_adder #(.WIDTH(8)) u8 (.a(a8), .b(b8), .cin(cin8), .sum(s8), .cout(co8));
  hybrid_adder #(.WIDTH(32), .FANOUT(FANOUT_ALL_ONE)) u32 (
    .a(a32), .b(b32), .cin(1'b0), .sum(s32), .cout(co32));

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
    a32 = '0; b32 = '0;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y); cin8 = 1'($urandom);
        a = 16'(x) << (y % 9); b = 16'(y) << (x % 9); cin = 1'($urandom);
        #1;
        check("w8", {24'd0, co8, s8}, 33'(x + y + int'(cin8)));
        check("w16", {16'd0, co, s}, 33'(a) + 33'(b) + 33'(cin));
      end
    for (int k = 0; k < 20000; k++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      a32 = $urandom; b32 = $urandom;
      if (k < 32) begin a = '1; b = 16'(k); cin = k[0]; a32 = '1; b32 = 32'(k); end
      #1;
      check("w16 random", {16'd0, co, s}, 33'(a) + 33'(b) + 33'(cin));
      check("w32 all-ones list", {co32, s32}, 33'(a32) + 33'(b32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
