// tb_knowles_adder: self-checking test of the Knowles adder.
// The default 8-bit [2,1,1] instance is checked exhaustively (all a, b,
// cin). Further instances cover other members of the family: 16-bit
// [2,1,1,1], 16-bit [4,1,1,1], 16-bit Sklansky [8,4,2,1] and 16-bit
// Kogge-Stone [1,1,1,1], on random and carry-chain operands.
// Reference: the built-in + operator.
module tb_knowles_adder;
  import mul_pkg::*;
  int checks = 0, failures = 0;

  localparam fanout_t F4111 = {{(MAX_LEVELS-1){8'd1}}, 8'd4};
  localparam fanout_t F8421 = {{(MAX_LEVELS-4){8'd1}}, 8'd1, 8'd2, 8'd4, 8'd8};

  logic [7:0]  a8, b8, s8;   logic cin8, co8;
  logic [15:0] a, b;         logic cin;
  logic [15:0] s [4];        logic co [4];

  knowles_adder u8 (.a(a8), .b(b8), .cin(cin8), .sum(s8), .cout(co8));
  knowles_adder #(.WIDTH(16))                          u_2111 (.a(a), .b(b), .cin(cin), .sum(s[0]), .cout(co[0]));
  knowles_adder #(.WIDTH(16), .FANOUT(F4111))          u_4111 (.a(a), .b(b), .cin(cin), .sum(s[1]), .cout(co[1]));
  knowles_adder #(.WIDTH(16), .FANOUT(F8421))          u_8421 (.a(a), .b(b), .cin(cin), .sum(s[2]), .cout(co[2]));
  knowles_adder #(.WIDTH(16), .FANOUT(FANOUT_ALL_ONE)) u_1111 (.a(a), .b(b), .cin(cin), .sum(s[3]), .cout(co[3]));

  task automatic check(string what, logic [16:0] got, logic [16:0] exp);
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
    a = '0; b = '0; cin = 0;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(x); b8 = 8'(y); cin8 = c[0];
          #1 check("w8 [2,1,1]", {8'd0, co8, s8}, 17'(x + y + c));
        end
    for (int k = 0; k < 20000; k++) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      if (k < 32) begin a = '1; b = 16'(k); cin = k[0]; end
      #1;
      for (int v = 0; v < 4; v++)
        check($sformatf("w16 variant %0d", v), {co[v], s[v]}, 17'(a) + 17'(b) + 17'(cin));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
