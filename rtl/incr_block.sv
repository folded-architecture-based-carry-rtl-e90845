// incr_block: incrementation block of one CI-CSKA stage.
//
// Adds the stage's carry in to the intermediate sum of the RCA block, which
// was formed with a carry in of zero: s_out = (s_in + c) mod 2^M. It is a
// half-adder chain, t_0 = c, s_out_i = s_in_i XOR t_i,
// t_{i+1} = s_in_i AND t_i, the simplest incrementer. The document names
// the incrementation scheme but not its gates, so the gates are this
// design's choice. When CIN_INV is 1 the carry arrives complemented (it
// comes from an AOI skip gate) and c = ~c_in. No carry out: the stage's
// carry is formed by the skip gate. Purely combinational.
module incr_block #(
  parameter int unsigned M       = 4,
  parameter bit          CIN_INV = 1'b0
) (
  input  logic [M-1:0] s_in,
  input  logic         c_in,
  output logic [M-1:0] s_out
);

  logic [M-1:0] t;

  assign t[0] = CIN_INV ? ~c_in : c_in;

  for (genvar i = 0; i < M; i++) begin : g_bit
    assign s_out[i] = s_in[i] ^ t[i];
    if (i + 1 < M) begin : g_chain
      assign t[i+1] = s_in[i] & t[i];
    end
  end

endmodule
