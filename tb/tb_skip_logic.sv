// tb_skip_logic: checks both compound skip gates as carry logic.
// For every block propagate P, generate G and carry C that a real block can
// produce (P and G never both 1), the AOI gate fed with P, C, G must give
// NOT Cout and the OAI gate fed with ~P, ~C, ~G must give Cout, where
// Cout = 1 when the block generates, or propagates an incoming carry.
// The raw gate functions are checked on all eight inputs as well.
module tb_skip_logic;
  import cska_pkg::*;
  int checks = 0, failures = 0;

  logic x, y, z, o_aoi, o_oai;
  logic xo, yo, zo;

  skip_logic                    u_aoi (.x(x),  .y(y),  .z(z),  .o(o_aoi));
  skip_logic #(.KIND(SKIP_OAI)) u_oai (.x(xo), .y(yo), .z(zo), .o(o_oai));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Carry behaviour.
    for (int v = 0; v < 8; v++) begin
      logic p, g, c, cout;
      {p, g, c} = 3'(v);
      if (p && g) continue;
      cout = g ? 1'b1 : (p ? c : 1'b0);
      x = p;  y = c;  z = g;
      xo = ~p; yo = ~c; zo = ~g;
      #1;
      checks += 2;
      if (o_aoi !== ~cout) begin failures++; $display("FAIL AOI p=%b g=%b c=%b", p, g, c); end
      if (o_oai !== cout)  begin failures++; $display("FAIL OAI p=%b g=%b c=%b", p, g, c); end
    end
    // Gate truth tables.
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      {xo, yo, zo} = 3'(v);
      #1;
      checks += 2;
      if (o_aoi !== !((v == 7) || (v == 6) || (v[0] == 1))) begin failures++; $display("FAIL AOI table %0d", v); end
      if (o_oai !== !((v[0] == 1) && (v[2:1] != 0)))        begin failures++; $display("FAIL OAI table %0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
