// mirror_fa: mirror full-adder cell.
//
// The mirror adder is the usual static CMOS full adder whose pull-up and
// pull-down networks are mirror images; it naturally produces the
// complement of the carry (co_n) and the complement of the sum (s_n).
// Because the full-adder function is self-dual, feeding the cell with
// inverted a, b and c gives the true carry and true sum, which lets a
// ripple chain alternate polarity from cell to cell with no inverter on the
// carry path (see rca_block). The inverting outputs follow the document;
// only the logic function is modelled, not transistor sizing.
//
// Purely combinational.
module mirror_fa (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s_n,
  output logic co_n
);

  always_comb begin
    co_n = ~((a & b) | (c & (a | b)));
    s_n  = ~(a ^ b ^ c);
  end

endmodule
