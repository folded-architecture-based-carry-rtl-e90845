// folded_cska: folded N-bit carry-skip adder.
//
// Folding lets one piece of hardware do, over several clock cycles, the
// work of several identical units. Here an N-bit addition is cut into FOLD
// slices of W = N/FOLD bits, and a single W-bit CFF-CI-CSKA core
// (cff_ci_cska) adds them one per clock cycle, least significant slice
// first; a register carries the slice carry from one pass to the next. With
// the defaults (N = 32, M = 4, FOLD = 8) the core is one 4-bit stage used
// eight times, in place of eight stages side by side. FOLD = 1 gives the
// fully parallel adder with one register stage.
//
// Interface and timing:
//   * start is sampled on a rising clk edge while busy is low; a, b and cin
//     are captured in that cycle, busy rises.
//   * Pass k (k = 0..FOLD-1) happens in the k-th cycle after that edge and
//     writes sum[k*W +: W].
//   * done is a one-cycle pulse FOLD cycles after the start edge, together
//     with busy falling; sum and cout hold until the next start. A start in
//     the done cycle is accepted.
//   * start while busy is ignored. rst_n is asynchronous, active low.
// The slice order, registers and handshake are this design's choices; the
// document gives the folding idea and the eight-pass count.
// The two assertions are disabled during reset, so rst_n is read both as
// an asynchronous reset and inside clocked assertion logic; a linter may
// note this mix, it has no effect on the hardware.
module folded_cska #(
  parameter int unsigned N    = 32,
  parameter int unsigned M    = 4,
  parameter int unsigned FOLD = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] sum,
  output logic         cout
);

  localparam int unsigned W  = N / FOLD;
  localparam int unsigned CW = (FOLD > 1) ? $clog2(FOLD) : 1;

  if (N % FOLD != 0 || W % M != 0) begin : g_bad_size
    $error("folded_cska: N must split into FOLD slices that are multiples of M");
  end

  typedef enum logic {IDLE, RUN} state_e;

  state_e        state;
  logic [N-1:0]  a_r, b_r, sum_r;
  logic          carry_r, cout_r, done_r;
  logic [CW-1:0] pass;

  // The shared core and its slice-select multiplexers.
  logic [W-1:0]  core_a, core_b, core_sum;
  logic          core_cout;

  assign core_a = a_r[pass*W +: W];
  assign core_b = b_r[pass*W +: W];

  cff_ci_cska #(.N(W), .M(M)) u_core (
    .a   (core_a),
    .b   (core_b),
    .cin (carry_r),
    .sum (core_sum),
    .cout(core_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      a_r     <= '0;
      b_r     <= '0;
      sum_r   <= '0;
      carry_r <= 1'b0;
      cout_r  <= 1'b0;
      done_r  <= 1'b0;
      pass    <= '0;
    end else begin
      done_r <= 1'b0;
      unique case (state)
        IDLE: begin
          if (start) begin
            a_r     <= a;
            b_r     <= b;
            carry_r <= cin;
            pass    <= '0;
            state   <= RUN;
          end
        end
        RUN: begin
          sum_r[pass*W +: W] <= core_sum;
          carry_r            <= core_cout;
          if (pass == CW'(FOLD - 1)) begin
            cout_r <= core_cout;
            done_r <= 1'b1;
            pass   <= '0;
            state  <= IDLE;
          end else begin
            pass <= pass + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state == RUN);
  assign done = done_r;
  assign sum  = sum_r;
  assign cout = cout_r;

  // done is a single-cycle pulse and follows a pass, never an idle cycle.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done_r |=> !done_r);
  a_pass_range: assert property (@(posedge clk) disable iff (!rst_n) int'(pass) < int'(FOLD));

endmodule
