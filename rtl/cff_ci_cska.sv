// cff_ci_cska: N-bit carry-feed-forward concatenation-incrementation
// carry-skip adder (CFF-CI-CSKA), fixed stage size M.
//
// The operands are cut into Q = N/M slices, one cska_stage each. Every
// stage adds its slice with a zero carry in and computes its own carry out
// from the operands (carry feed-forward), so all stages work in parallel
// from the moment the operands arrive. The carry chain is then just Q
// compound gates, AOI and OAI alternating (stage 0 is AOI, so even stages
// output the complemented carry, odd stages the true carry), and each
// stage's incrementation block adds the carry that reaches it. The worst
// path is operand -> CFF of stage 0 -> Q skip gates -> incrementer of the
// last stage.
//
// Ports: a, b, cin in; sum = (a + b + cin) mod 2^N and cout (true polarity)
// out. If Q is odd the last stage's carry is complemented and one inverter
// restores it. Purely combinational. N must be a multiple of M; the
// defaults N = 32, M = 4 are the document's eight 4-bit blocks.
module cff_ci_cska
  import cska_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned M = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  localparam int unsigned Q = N / M;

  if (N % M != 0 || M < 2) begin : g_bad_size
    $error("cff_ci_cska: N must be a multiple of M and M at least 2");
  end

  // c[j] is the carry into stage j as it appears on the wire: true for
  // even j, complemented for odd j.
  logic [Q:0] c;

  assign c[0] = cin;

  for (genvar j = 0; j < Q; j++) begin : g_stage
    cska_stage #(.M(M), .KIND(skip_kind_of(j))) u_stage (
      .a    (a[j*M +: M]),
      .b    (b[j*M +: M]),
      .c_in (c[j]),
      .sum  (sum[j*M +: M]),
      .c_out(c[j+1])
    );
  end

  // c[Q] is complemented when Q is odd (the last stage is an AOI).
  assign cout = (Q % 2 == 1) ? ~c[Q] : c[Q];

endmodule
