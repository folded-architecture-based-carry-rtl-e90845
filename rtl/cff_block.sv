// cff_block: carry feed-forward block of one M-bit stage.
//
// The block's carry out for a zero carry in is computed straight from the
// operand bits instead of rippling through the RCA block: each bit's
// propagate p_i = a_i XOR b_i and generate g_i = a_i AND b_i feed AND-OR
// logic,  g = OR_i ( g_i AND p_{i+1} AND ... AND p_{M-1} ).
// The block propagate p = AND of all p_i (the carry may skip the block) is
// built, as the document prescribes, from a tree of 2-input NAND and NOR
// gates rather than one wide AND gate: NAND on even tree levels, NOR on odd
// ones, with the polarity of the final level corrected if the tree has an
// odd depth. Padding leaves (M not a power of two) are tied to 1.
// Purely combinational.
module cff_block #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         g,
  output logic         p
);

  localparam int unsigned DEPTH  = (M <= 1) ? 0 : $clog2(M);
  localparam int unsigned LEAVES = 1 << DEPTH;

  logic [M-1:0] pb, gb;

  assign pb = a ^ b;
  assign gb = a & b;

  // AND-OR carry logic (zero carry in).
  always_comb begin
    logic [M-1:0] term;
    for (int i = 0; i < M; i++) begin
      term[i] = gb[i];
      for (int k = i + 1; k < M; k++) term[i] = term[i] & pb[k];
    end
    g = |term;
  end

  // NAND/NOR tree for the block propagate. lvl[d] holds 2^(DEPTH-d) nodes;
  // nodes on even levels are true-polarity ANDs, on odd levels complemented.
  logic [LEAVES-1:0] lvl [DEPTH+1];

  always_comb begin
    for (int d = 0; d <= DEPTH; d++) lvl[d] = '0;
    for (int i = 0; i < LEAVES; i++) lvl[0][i] = (i < M) ? pb[i] : 1'b1;
    for (int d = 1; d <= DEPTH; d++) begin
      for (int i = 0; i < (LEAVES >> d); i++) begin
        if (d % 2 == 1) lvl[d][i] = ~(lvl[d-1][2*i] & lvl[d-1][2*i+1]);  // NAND
        else            lvl[d][i] = ~(lvl[d-1][2*i] | lvl[d-1][2*i+1]);  // NOR
      end
    end
    p = (DEPTH % 2 == 1) ? ~lvl[DEPTH][0] : lvl[DEPTH][0];
  end

endmodule
