// tb_mirror_fa: exhaustive check of the mirror full-adder cell.
// All eight input combinations; the expected complemented carry and sum are
// taken from the integer sum a + b + c. Also checks the self-dual property
// the ripple chain relies on: inverting all inputs inverts both outputs.
module tb_mirror_fa;
  logic a, b, c, s_n, co_n;
  int checks = 0, failures = 0;

  mirror_fa dut (.a(a), .b(b), .c(c), .s_n(s_n), .co_n(co_n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      logic s_n0, co_n0;
      {a, b, c} = 3'(v);
      total = int'(a) + int'(b) + int'(c);
      #1;
      checks++;
      if (s_n !== ~total[0] || co_n !== ~total[1]) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b s_n=%b co_n=%b", a, b, c, s_n, co_n);
      end
      s_n0 = s_n; co_n0 = co_n;
      {a, b, c} = ~3'(v);
      #1;
      checks++;
      if (s_n !== ~s_n0 || co_n !== ~co_n0) begin
        failures++;
        $display("FAIL self-duality at v=%0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
