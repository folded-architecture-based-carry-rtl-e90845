// rca_block: M-bit ripple-carry block of the carry-feed-forward CI-CSKA.
//
// In the concatenation-incrementation scheme every block adds its slice
// with a carry in of zero; the real carry in is added later by the
// incrementation block, and the block's carry out is produced by the
// carry feed-forward block. Following the document this lets the block
// shed logic at both ends:
//   * bit 0 is a half adder (its carry in is always zero);
//   * bits 1..M-2 are mirror full adders (mirror_fa). A mirror cell fed
//     with true signals returns the complemented carry; the next cell is
//     fed with inverted a, b and carry and so returns the true carry. The
//     polarity alternates along the chain with no carry-path inverter;
//     the inverters sit on the operand and sum side, off the carry path;
//   * bit M-1 computes only its sum: no carry out is needed.
// Output s = (a + b) mod 2^M. Purely combinational. M >= 2.
module rca_block #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] s
);

  // c_pol[i]: carry into bit i as it physically appears on the wire.
  // c_inv[i]: 1 when that wire carries the complemented carry.
  logic [M-1:0] c_pol;
  localparam logic [M-1:0] C_INV = inv_pattern();

  // Carry into bit 1 comes from the half adder (true polarity); every
  // mirror cell after it flips the polarity.
  function automatic logic [M-1:0] inv_pattern();
    logic [M-1:0] r;
    r = '0;
    for (int i = 2; i < M; i++) r[i] = ~r[i-1];
    return r;
  endfunction

  if (M < 2) begin : g_bad_m
    $error("rca_block: M must be at least 2");
  end

  // Bit 0: half adder. c_pol[0] is unused: the block's carry in is zero.
  assign s[0]     = a[0] ^ b[0];
  assign c_pol[0] = 1'b0;
  assign c_pol[1] = a[0] & b[0];

  // Bits 1..M-2: mirror full adders with alternating input polarity.
  for (genvar i = 1; i + 1 < M; i++) begin : g_fa
    logic s_n, co_n;
    if (C_INV[i]) begin : g_inv_in
      // Carry arrives complemented: feed inverted operands, get true outputs.
      mirror_fa u_fa (.a(~a[i]), .b(~b[i]), .c(c_pol[i]), .s_n(s_n), .co_n(co_n));
      assign s[i] = s_n;
    end else begin : g_true_in
      // Carry arrives true: the cell returns complemented outputs.
      mirror_fa u_fa (.a(a[i]), .b(b[i]), .c(c_pol[i]), .s_n(s_n), .co_n(co_n));
      assign s[i] = ~s_n;
    end
    assign c_pol[i+1] = co_n;
  end

  // Bit M-1: sum-only cell, no carry-out gates.
  assign s[M-1] = a[M-1] ^ b[M-1] ^ (c_pol[M-1] ^ C_INV[M-1]);

endmodule
