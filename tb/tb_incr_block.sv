// tb_incr_block: exhaustive check of the incrementation block.
// Widths 4 (the default) and 7, with the carry arriving true (CIN_INV=0)
// and complemented (CIN_INV=1). Expected output: (s_in + carry) mod 2^M.
module tb_incr_block;
  int checks = 0, failures = 0;

  logic [3:0] s4, o4t, o4i;
  logic [6:0] s7, o7t, o7i;
  logic       c;

  incr_block                        u4t (.s_in(s4), .c_in(c),  .s_out(o4t));
  incr_block #(.CIN_INV(1'b1))      u4i (.s_in(s4), .c_in(~c), .s_out(o4i));
  incr_block #(.M(7))               u7t (.s_in(s7), .c_in(c),  .s_out(o7t));
  incr_block #(.M(7), .CIN_INV(1))  u7i (.s_in(s7), .c_in(~c), .s_out(o7i));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      for (int k = 0; k < 2; k++) begin
        int e4, e7;
        s4 = 4'(v); s7 = 7'(v); c = k[0];
        e4 = ((v % 16) + k) % 16;
        e7 = (v + k) % 128;
        #1;
        if (v < 16) begin
          checks += 2;
          if (int'(o4t) != e4 || int'(o4i) != e4) begin failures++; $display("FAIL M=4 s=%0d c=%0d -> %0d %0d", v, k, o4t, o4i); end
        end
        checks += 2;
        if (int'(o7t) != e7 || int'(o7i) != e7) begin failures++; $display("FAIL M=7 s=%0d c=%0d -> %0d %0d", v, k, o7t, o7i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
