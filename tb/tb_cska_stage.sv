// tb_cska_stage: exhaustive check of one 4-bit stage in both polarities.
// Every a, b and carry in is applied to an AOI stage (true carry in,
// complemented carry out) and an OAI stage (complemented carry in, true
// carry out). Expected sum and carry come from the integer a + b + cin.
// Counts how often the carry was skipped (all bits propagate) and how often
// the stage generated its own carry.
module tb_cska_stage;
  import cska_pkg::*;
  int checks = 0, failures = 0;
  int n_skip = 0, n_gen = 0;

  logic [3:0] a, b, s_aoi, s_oai;
  logic       c, co_aoi_n, co_oai;

  cska_stage                    u_aoi (.a(a), .b(b), .c_in(c),  .sum(s_aoi), .c_out(co_aoi_n));
  cska_stage #(.KIND(SKIP_OAI)) u_oai (.a(a), .b(b), .c_in(~c), .sum(s_oai), .c_out(co_oai));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        for (int k = 0; k < 2; k++) begin
          int total;
          a = 4'(x); b = 4'(y); c = k[0];
          total = x + y + k;
          #1;
          checks += 2;
          if (int'(s_aoi) != total % 16 || co_aoi_n !== ~total[4]) begin
            failures++;
            $display("FAIL AOI a=%0d b=%0d c=%0d s=%0d co_n=%b", x, y, k, s_aoi, co_aoi_n);
          end
          if (int'(s_oai) != total % 16 || co_oai !== total[4]) begin
            failures++;
            $display("FAIL OAI a=%0d b=%0d c=%0d s=%0d co=%b", x, y, k, s_oai, co_oai);
          end
          if ((x ^ y) == 15 && k == 1) n_skip++;
          if (x + y >= 16) n_gen++;
        end
      end
    end
    $display("skips=%0d generates=%0d", n_skip, n_gen);
    if (n_skip == 0 || n_gen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
