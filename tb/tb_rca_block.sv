// tb_rca_block: exhaustive check of the zero-carry ripple block.
// For block widths 2, 3, 4 (the default), 5 and 6, every operand pair is
// applied and s is compared with (a + b) mod 2^M computed in integer
// arithmetic. Odd and even widths exercise both polarities of the last
// cell's carry.
module tb_rca_block;
  int checks = 0, failures = 0;

  logic [1:0] a2, b2, s2;
  logic [2:0] a3, b3, s3;
  logic [3:0] a4, b4, s4;
  logic [4:0] a5, b5, s5;
  logic [5:0] a6, b6, s6;

  rca_block #(.M(2)) u2 (.a(a2), .b(b2), .s(s2));
  rca_block #(.M(3)) u3 (.a(a3), .b(b3), .s(s3));
  rca_block          u4 (.a(a4), .b(b4), .s(s4));
  rca_block #(.M(5)) u5 (.a(a5), .b(b5), .s(s5));
  rca_block #(.M(6)) u6 (.a(a6), .b(b6), .s(s6));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int m, input int x, input int y, input int got);
    int exp_s;
    exp_s = (x + y) % (1 << m);
    checks++;
    if (got != exp_s) begin
      failures++;
      if (failures < 10) $display("FAIL M=%0d a=%0d b=%0d s=%0d exp=%0d", m, x, y, got, exp_s);
    end
  endtask

  initial begin
    for (int x = 0; x < 64; x++) begin
      for (int y = 0; y < 64; y++) begin
        a2 = 2'(x); b2 = 2'(y);
        a3 = 3'(x); b3 = 3'(y);
        a4 = 4'(x); b4 = 4'(y);
        a5 = 5'(x); b5 = 5'(y);
        a6 = 6'(x); b6 = 6'(y);
        #1;
        if (x < 4  && y < 4)  check(2, x, y, int'(s2));
        if (x < 8  && y < 8)  check(3, x, y, int'(s3));
        if (x < 16 && y < 16) check(4, x, y, int'(s4));
        if (x < 32 && y < 32) check(5, x, y, int'(s5));
        check(6, x, y, int'(s6));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
