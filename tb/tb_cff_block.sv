// tb_cff_block: exhaustive check of the carry feed-forward block.
// For widths 3, 4 (the default), 5 and 8 every operand pair is applied.
// Expected g is bit M of the integer sum a + b (carry out with zero carry
// in); expected p is 1 exactly when a + b equals 2^M - 1 with no carry,
// i.e. a XOR b is all ones. Widths 3 and 5 exercise the padded NAND/NOR
// tree, widths 4 and 8 trees of even and odd depth.
module tb_cff_block;
  int checks = 0, failures = 0;
  int n_skip = 0;

  logic [2:0] a3, b3;  logic g3, p3;
  logic [3:0] a4, b4;  logic g4, p4;
  logic [4:0] a5, b5;  logic g5, p5;
  logic [7:0] a8, b8;  logic g8, p8;

  cff_block #(.M(3)) u3 (.a(a3), .b(b3), .g(g3), .p(p3));
  cff_block          u4 (.a(a4), .b(b4), .g(g4), .p(p4));
  cff_block #(.M(5)) u5 (.a(a5), .b(b5), .g(g5), .p(p5));
  cff_block #(.M(8)) u8 (.a(a8), .b(b8), .g(g8), .p(p8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int m, input int x, input int y, input logic g, input logic p);
    int total;
    logic eg, ep;
    total = x + y;
    eg = 1'((total >> m) & 1);
    ep = (total == (1 << m) - 1) && ((x & y) == 0);
    checks++;
    if (ep) n_skip++;
    if (g !== eg || p !== ep) begin
      failures++;
      if (failures < 10) $display("FAIL M=%0d a=%0d b=%0d g=%b p=%b exp %b %b", m, x, y, g, p, eg, ep);
    end
  endtask

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a3 = 3'(x); b3 = 3'(y);
        a4 = 4'(x); b4 = 4'(y);
        a5 = 5'(x); b5 = 5'(y);
        a8 = 8'(x); b8 = 8'(y);
        #1;
        if (x < 8  && y < 8)  check(3, x, y, g3, p3);
        if (x < 16 && y < 16) check(4, x, y, g4, p4);
        if (x < 32 && y < 32) check(5, x, y, g5, p5);
        check(8, x, y, g8, p8);
      end
    end
    $display("propagate cases seen: %0d", n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
