// tb_folded_variants: the folded adder at other folding factors.
// FOLD = 1 (fully parallel, one pass), FOLD = 2 (two 16-bit passes),
// FOLD = 4 (four 8-bit passes, each pass through two stages, so the AOI/OAI
// alternation and the final-carry polarity of a two-stage core are used),
// and a 64-bit adder folded into eight 8-bit passes. All instances get the
// same start pulse; each must raise done exactly FOLD cycles after the start
// edge with the right sum.
module tb_folded_variants;
  logic        clk = 1'b0, rst_n = 1'b0, start = 1'b0, cin = 1'b0;
  logic [63:0] a = '0, b = '0;
  logic [31:0] s1, s2, s4;
  logic [63:0] s64;
  logic [3:0]  busy, done, cout;

  int checks = 0, failures = 0;

  folded_cska #(.FOLD(1)) u1 (.clk(clk), .rst_n(rst_n), .start(start), .a(a[31:0]), .b(b[31:0]), .cin(cin),
                              .busy(busy[0]), .done(done[0]), .sum(s1), .cout(cout[0]));
  folded_cska #(.FOLD(2)) u2 (.clk(clk), .rst_n(rst_n), .start(start), .a(a[31:0]), .b(b[31:0]), .cin(cin),
                              .busy(busy[1]), .done(done[1]), .sum(s2), .cout(cout[1]));
  folded_cska #(.FOLD(4)) u4 (.clk(clk), .rst_n(rst_n), .start(start), .a(a[31:0]), .b(b[31:0]), .cin(cin),
                              .busy(busy[2]), .done(done[2]), .sum(s4), .cout(cout[2]));
  folded_cska #(.N(64), .FOLD(8)) u64 (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b), .cin(cin),
                              .busy(busy[3]), .done(done[3]), .sum(s64), .cout(cout[3]));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [32:0] e32;
    logic [64:0] e64;
    int          seen [4];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      a = {$urandom, $urandom};
      b = (i % 2 == 0) ? ~a : {$urandom, $urandom};
      cin = 1'($urandom);
      e32 = {1'b0, a[31:0]} + {1'b0, b[31:0]} + 33'(cin);
      e64 = {1'b0, a} + {1'b0, b} + 65'(cin);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int k = 0; k < 4; k++) seen[k] = -1;
      for (int c = 0; c <= 9; c++) begin
        for (int k = 0; k < 4; k++) if (done[k]) seen[k] = c;
        if (c < 9) @(negedge clk);
      end
      checks += 8;
      if (seen[0] != 1 || seen[1] != 2 || seen[2] != 4 || seen[3] != 8) begin
        failures++;
        $display("FAIL latencies %0d %0d %0d %0d", seen[0], seen[1], seen[2], seen[3]);
      end
      if ({cout[0], s1} !== e32) begin failures++; $display("FAIL FOLD=1 %h", s1); end
      if ({cout[1], s2} !== e32) begin failures++; $display("FAIL FOLD=2 %h", s2); end
      if ({cout[2], s4} !== e32) begin failures++; $display("FAIL FOLD=4 %h", s4); end
      if ({cout[3], s64} !== e64) begin failures++; $display("FAIL N=64 %h", s64); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
