// tb_cff_ci_cska: self-checking test of the combinational CFF-CI-CSKA.
// Four instances: the default 32-bit adder (eight 4-bit stages), the 16- and
// 64-bit adders the document also compares, and a 12-bit one whose odd
// stage count makes the last skip gate an AOI (complemented final carry).
// Stimulus: random operands, operands whose bits all propagate (b = ~a) so
// that the carry in skips every stage, alternating generate/propagate
// patterns, and all-zero / all-one corners. Expected values come from the
// simulator's own wide addition. Counts full-length skips and carry outs.
module tb_cff_ci_cska;
  int checks = 0, failures = 0;
  int n_full_skip = 0, n_cout = 0;

  logic [15:0] a16, b16, s16;  logic co16;
  logic [31:0] a32, b32, s32;  logic co32;
  logic [63:0] a64, b64, s64;  logic co64;
  logic [11:0] a12, b12, s12;  logic co12;
  logic        cin;

  cff_ci_cska #(.N(16)) u16 (.a(a16), .b(b16), .cin(cin), .sum(s16), .cout(co16));
  cff_ci_cska           u32 (.a(a32), .b(b32), .cin(cin), .sum(s32), .cout(co32));
  cff_ci_cska #(.N(64)) u64 (.a(a64), .b(b64), .cin(cin), .sum(s64), .cout(co64));
  cff_ci_cska #(.N(12)) u12 (.a(a12), .b(b12), .cin(cin), .sum(s12), .cout(co12));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [63:0] x, input logic [63:0] y, input logic ci);
    logic [64:0] e64;
    logic [32:0] e32;
    logic [16:0] e16;
    logic [12:0] e12;
    a64 = x;       b64 = y;
    a32 = x[31:0]; b32 = y[31:0];
    a16 = x[15:0]; b16 = y[15:0];
    a12 = x[11:0]; b12 = y[11:0];
    cin = ci;
    e64 = {1'b0, x} + {1'b0, y} + 65'(ci);
    e32 = {1'b0, x[31:0]} + {1'b0, y[31:0]} + 33'(ci);
    e16 = {1'b0, x[15:0]} + {1'b0, y[15:0]} + 17'(ci);
    e12 = {1'b0, x[11:0]} + {1'b0, y[11:0]} + 13'(ci);
    #1;
    checks += 4;
    if ({co64, s64} !== e64) begin failures++; if (failures < 10) $display("FAIL 64 %h+%h+%b -> %b %h", x, y, ci, co64, s64); end
    if ({co32, s32} !== e32) begin failures++; if (failures < 10) $display("FAIL 32 %h+%h+%b -> %b %h", x[31:0], y[31:0], ci, co32, s32); end
    if ({co16, s16} !== e16) begin failures++; if (failures < 10) $display("FAIL 16 %h+%h+%b -> %b %h", x[15:0], y[15:0], ci, co16, s16); end
    if ({co12, s12} !== e12) begin failures++; if (failures < 10) $display("FAIL 12 %h+%h+%b -> %b %h", x[11:0], y[11:0], ci, co12, s12); end
    if ((x[31:0] ^ y[31:0]) == '1 && ci) n_full_skip++;
    if (e32[32]) n_cout++;
  endtask

  initial begin
    logic [63:0] x, y;
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, 64'd1, 1'b0);
    for (int i = 0; i < 20000; i++) begin
      x = {$urandom, $urandom};
      y = {$urandom, $urandom};
      unique case (i % 4)
        0: apply(x, y, 1'($urandom));
        1: apply(x, ~x, 1'($urandom));                        // every bit propagates
        2: apply(x, ~x ^ (64'h1 << ($urandom % 64)), 1'b1);   // one break in the chain
        default: apply(x & 64'h0f0f_0f0f_0f0f_0f0f, ~x & 64'hffff_0000_ffff_0000, 1'($urandom));
      endcase
    end
    $display("full-length skips=%0d carry outs=%0d", n_full_skip, n_cout);
    if (n_full_skip == 0 || n_cout == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
