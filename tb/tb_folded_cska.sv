// tb_folded_cska: end-to-end test of the folded adder at its default size
// (N = 32, four-bit core, eight passes per addition).
// Each addition is started with a one-cycle start pulse; the test waits for
// done, checks that exactly FOLD cycles passed, and compares sum and cout
// with the simulator's 33-bit addition. Mechanisms that must each occur at
// least once: a carry handed from one pass to the next, a carry skipping
// every stage of the whole word, a start ignored while busy, a new start
// accepted in the same cycle as done, and a reset in the middle of an
// addition.
module tb_folded_cska;
  localparam int unsigned N    = 32;
  localparam int unsigned FOLD = 8;
  localparam int unsigned W    = N / FOLD;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0, cin = 1'b0;
  logic [N-1:0] a = '0, b = '0, sum;
  logic         busy, done, cout;

  int checks = 0, failures = 0;
  int n_pass_carry = 0, n_full_skip = 0, n_ignored = 0, n_back_to_back = 0, n_reset = 0;

  folded_cska dut (
    .clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b), .cin(cin),
    .busy(busy), .done(done), .sum(sum), .cout(cout)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Carries that cross a slice boundary in a + b + c.
  function automatic bit crosses_slice(input logic [N-1:0] x, input logic [N-1:0] y, input logic c);
    logic [N:0] t;
    t = {1'b0, x} + {1'b0, y} + (N+1)'(c);
    for (int k = 1; k < FOLD; k++)
      if ((t[k*W] ^ x[k*W] ^ y[k*W]) == 1'b1) return 1;
    return 0;
  endfunction

  // Drive one addition; returns after done has been checked.
  // next_x/next_y/next_c: operands of an addition started in the done cycle
  // when chain is set.
  task automatic run(input logic [N-1:0] x, input logic [N-1:0] y, input logic c,
                     input bit poke_busy);
    logic [N:0] expv;
    int cycles;
    expv = {1'b0, x} + {1'b0, y} + (N+1)'(c);
    @(negedge clk);
    a = x; b = y; cin = c; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!done) begin
      if (poke_busy && cycles == 3) begin
        // A start while busy, with other operands: must be ignored.
        a = ~x; b = x; cin = ~c; start = 1'b1;
        n_ignored++;
      end else begin
        start = 1'b0;
      end
      @(negedge clk);
      cycles++;
      if (cycles > 4 * FOLD) break;
    end
    start = 1'b0;
    checks += 2;
    if (cycles != FOLD) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", cycles, FOLD);
    end
    if ({cout, sum} !== expv) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %b -> %b %h, expected %h", x, y, c, cout, sum, expv);
    end
    if (crosses_slice(x, y, c)) n_pass_carry++;
    if ((x ^ y) == '1 && c) n_full_skip++;
  endtask

  initial begin
    logic [N-1:0] x, y;
    logic [N:0]   e1, e2;
    int           cycles;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (busy || done) begin failures++; $display("FAIL busy/done after reset"); end

    run('0, '0, 1'b0, 0);
    run('1, '0, 1'b1, 0);           // carry skips the whole word
    run('1, '1, 1'b1, 1);           // start while busy is ignored
    for (int i = 0; i < 3000; i++) begin
      x = $urandom;
      y = (i % 3 == 0) ? ~x : $urandom;
      run(x, y, 1'($urandom), (i % 50) == 7);
    end

    // Back-to-back: a second start in the cycle done is high.
    x = 32'h89ab_cdef; y = 32'h7654_3211;
    e1 = {1'b0, x} + {1'b0, y};
    e2 = {1'b0, y} + {1'b0, y} + 33'd1;
    @(negedge clk);
    a = x; b = y; cin = 1'b0; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!done && cycles < 4 * FOLD) begin @(negedge clk); cycles++; end
    checks += 2;
    if (cycles != FOLD || {cout, sum} !== e1) begin failures++; $display("FAIL first of back-to-back"); end
    a = y; b = y; cin = 1'b1; start = 1'b1;
    if (!busy) n_back_to_back++;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!done && cycles < 4 * FOLD) begin @(negedge clk); cycles++; end
    if (cycles != FOLD || {cout, sum} !== e2) begin failures++; $display("FAIL second of back-to-back"); end

    // Reset in the middle of an addition.
    @(negedge clk);
    a = '1; b = '1; cin = 1'b1; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b0;
    n_reset++;
    @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (busy || done || sum != '0 || cout) begin failures++; $display("FAIL state after reset"); end
    run(32'hffff_0000, 32'h0001_ffff, 1'b0, 0);

    $display("pass-to-pass carries=%0d full-word skips=%0d ignored starts=%0d back-to-back=%0d resets=%0d",
             n_pass_carry, n_full_skip, n_ignored, n_back_to_back, n_reset);
    if (n_pass_carry == 0 || n_full_skip == 0 || n_ignored == 0 || n_back_to_back == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
