// alg1_cell: internal cell X of algorithm I (operands moving in opposite
// directions).
//
// The original operand stream enters from the left and passes one flip-flop
// (r) on its way right. The reflected stream enters from the right and passes
// three flip-flops (u1, u2, u3) on its way left. Both streams carry a proper
// bit and a dummy (zero) alternately, so in a given cycle either both
// products below are real or the cell works on dummies. The two products
// u1*r and u3*r (AND gates) are added into the two result lines travelling
// left: the lower line through one full adder, whose carry feeds the full
// adder of the upper line. The upper adder's carry is kept in the cell and
// fed back to the lower adder two cycles later (flip-flops c1, c2), when the
// cell next holds proper bits and works on the result bits two positions
// higher. Each result line leaves through one flip-flop.
//
// Interface: a_in/a_out is the rightward operand line, back_in/back_out the
// three leftward lines (reflected operand, upper and lower result bits).
// Everything is registered: every output is a flip-flop, and latency through
// the cell is one cycle on each line except the reflected operand (three).
//
// The structure (three reflected-operand latches, one original-operand latch,
// two multipliers, two chained adders, carry fed back through two latches,
// result latches on the left) follows the drawing of cell X of algorithm I.
// The synchronous reset is this design's own addition.
module alg1_cell
  import bsq_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       a_in,
  output logic       a_out,
  input  alg1_back_t back_in,
  output alg1_back_t back_out
);

  logic r;                // original stream, one latch
  logic u1, u2, u3;       // reflected stream, three latches
  logic c1, c2;           // carry feedback, two latches
  logic p_hi_q, p_lo_q;   // result latches
  fa_t  lo, hi;

  always_comb begin
    lo = full_add(u3 & r, back_in.p_lo, c2);
    hi = full_add(u1 & r, back_in.p_hi, lo.c);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {r, u1, u2, u3, c1, c2, p_hi_q, p_lo_q} <= '0;
    end else begin
      r      <= a_in;
      u1     <= back_in.a_ref;
      u2     <= u1;
      u3     <= u2;
      c1     <= hi.c;
      c2     <= c1;
      p_hi_q <= hi.s;
      p_lo_q <= lo.s;
    end
  end

  assign a_out          = r;
  assign back_out.a_ref = u3;
  assign back_out.p_hi  = p_hi_q;
  assign back_out.p_lo  = p_lo_q;

endmodule
