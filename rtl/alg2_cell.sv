// alg2_cell: internal cell X of algorithm II (both operand copies moving in
// the same direction, at different speeds).
//
// The two operand copies run left to right, one through two flip-flops per
// cell (t1, t2) and one through one flip-flop (b). Once per cycle the cell
// multiplies (ANDs) the older bit of the slow copy with the fast copy's bit
// and adds it, with the carry kept from the previous cycle, to the result
// bit arriving on the upper line, which was held in a middle flip-flop (pm).
// That sum leaves on the lower line. The carry of that addition is added to
// the bit arriving, unlatched, on the lower line; the sum leaves on the upper
// line and its carry is stored for the next cycle, when the cell works on
// the result bits two positions higher. The result lines are crossed at the
// cell's input, so each result bit passes three flip-flops every two cells.
//
// Interface: link_in from the left neighbour, link_out to the right, both in
// drawing order (slow operand, upper result, lower result, fast operand).
// All outputs are registered.
//
// Follows the drawing of cell X of algorithm II (latches, multiplier, the two
// chained adders, the crossing of the result lines) with one exception: the
// drawing feeds the carry back through two latches, but then the carry
// arrives one cycle too late and the squares come out wrong. The text says a
// carry is added "one or two clock periods later, depending on which
// skeleton is used", and in this array the next higher result pair is handled
// one cycle later, so the carry is kept in a single flip-flop here. The
// synchronous reset is this design's own addition.
module alg2_cell
  import bsq_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  alg2_link_t link_in,
  output alg2_link_t link_out
);

  logic t1, t2;           // slow operand copy, two latches
  logic b;                // fast operand copy, one latch
  logic pm;               // result bit from the upper input line
  logic c;                // carry kept for the next cycle
  logic p_hi_q, p_lo_q;   // result latches
  fa_t  lo, hi;

  always_comb begin
    lo = full_add(t2 & b, pm, c);
    hi = full_add(link_in.p_lo, lo.c, 1'b0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {t1, t2, b, pm, c, p_hi_q, p_lo_q} <= '0;
    end else begin
      t1     <= link_in.a_slow;
      t2     <= t1;
      b      <= link_in.a_fast;
      pm     <= link_in.p_hi;
      c      <= hi.c;
      p_hi_q <= hi.s;
      p_lo_q <= lo.s;
    end
  end

  assign link_out.a_slow = t2;
  assign link_out.a_fast = b;
  assign link_out.p_hi   = p_hi_q;
  assign link_out.p_lo   = p_lo_q;

endmodule
