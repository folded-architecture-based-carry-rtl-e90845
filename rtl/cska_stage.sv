// cska_stage: one M-bit stage of the carry-feed-forward CI-CSKA.
//
// Four parts work side by side:
//   rca_block   adds the slice with a zero carry in (intermediate sum);
//   cff_block   computes, straight from the operands, the slice's carry out
//               for a zero carry in (G) and whether every bit propagates (P);
//   skip_logic  merges the incoming carry with G: Cout = G | P & Cin, in one
//               AOI or OAI compound gate;
//   incr_block  adds the incoming carry to the intermediate sum.
// The only path from c_in to c_out is the single compound gate, and neither
// G nor P depends on c_in: the carry never waits for the RCA block.
//
// Polarity (KIND):
//   SKIP_AOI  c_in is the true carry,        c_out is the complemented carry
//   SKIP_OAI  c_in is the complemented carry, c_out is the true carry
// The OAI form receives ~P and ~G; those inverters act on signals that are
// ready before the carry arrives. Purely combinational.
module cska_stage
  import cska_pkg::*;
#(
  parameter int unsigned M    = 4,
  parameter skip_kind_e  KIND = SKIP_AOI
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         c_in,
  output logic [M-1:0] sum,
  output logic         c_out
);

  logic [M-1:0] s_int;
  logic         g, p;

  rca_block #(.M(M)) u_rca (.a(a), .b(b), .s(s_int));

  cff_block #(.M(M)) u_cff (.a(a), .b(b), .g(g), .p(p));

  if (KIND == SKIP_AOI) begin : g_aoi
    skip_logic #(.KIND(SKIP_AOI)) u_skip (.x(p),  .y(c_in), .z(g),  .o(c_out));
  end else begin : g_oai
    skip_logic #(.KIND(SKIP_OAI)) u_skip (.x(~p), .y(c_in), .z(~g), .o(c_out));
  end

  incr_block #(.M(M), .CIN_INV(KIND == SKIP_OAI)) u_inc (
    .s_in(s_int), .c_in(c_in), .s_out(sum)
  );

endmodule
