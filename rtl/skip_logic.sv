// skip_logic: compound-gate carry skip of one CI-CSKA stage.
//
// The 2:1 multiplexer of the conventional carry-skip adder is replaced by a
// single compound gate that merges the stage's carry in with the carry
// produced by the carry feed-forward block:
//   AOI stage:  o = ~( (x & y) | z )  with x = P,  y = C,  z = G  -> o = ~Cout
//   OAI stage:  o = ~( (x | y) & z )  with x = ~P, y = ~C, z = ~G -> o =  Cout
// where Cout = G | (P & C). Alternating the two types along the chain keeps
// the carry path free of inverters, as the document describes; which pins
// take P, C and G is this design's reading of the document.
// Purely combinational.
module skip_logic
  import cska_pkg::*;
#(
  parameter skip_kind_e KIND = SKIP_AOI
) (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic o
);

  if (KIND == SKIP_AOI) begin : g_aoi
    assign o = ~((x & y) | z);
  end else begin : g_oai
    assign o = ~((x | y) & z);
  end

endmodule
