// tb_pp_reduction_tree: self-checking test of the hybrid reduction tree.
// The default 8-row tree gets (1) the partial product matrix of every pair
// of 8-bit operands, computed here, and (2) random matrices; the two output
// rows must add up to the weighted sum of the input rows. A 16-row instance
// (two Han-Carlson levels, then Knowles) is checked on random matrices.
module tb_pp_reduction_tree;
  int checks = 0, failures = 0;
  logic [7:0][7:0]   pp;
  logic [15:0]       ra, rb;
  logic [15:0][15:0] pp16;
  logic [31:0]       ra16, rb16;

  pp_reduction_tree u_dut (.pp(pp), .row_a(ra), .row_b(rb));
  pp_reduction_tree #(.N(16), .HCA_LEVELS(2)) u_16 (.pp(pp16), .row_a(ra16), .row_b(rb16));

  function automatic longint weighted8(logic [7:0][7:0] m);
    longint s = 0;
    for (int r = 0; r < 8; r++) s += longint'(m[r]) << r;
    return s;
  endfunction

  function automatic longint weighted16(logic [15:0][15:0] m);
    longint s = 0;
    for (int r = 0; r < 16; r++) s += longint'(m[r]) << r;
    return s;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    pp16 = '0;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        for (int r = 0; r < 8; r++) pp[r] = ((y >> r) & 1) ? 8'(x) : 8'd0;
        #1 check("products", (longint'(ra) + longint'(rb)) & 64'hFFFF, longint'(x * y));
      end
    for (int k = 0; k < 20000; k++) begin
      for (int r = 0; r < 8; r++)  pp[r]   = 8'($urandom);
      for (int r = 0; r < 16; r++) pp16[r] = 16'($urandom);
      if (k == 0) begin pp = '1; pp16 = '1; end
      #1;
      check("random 8", (longint'(ra) + longint'(rb)) & 64'hFFFF, weighted8(pp));
      check("random 16", (longint'(ra16) + longint'(rb16)) & 64'hFFFF_FFFF, weighted16(pp16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
