// alg2_special: special cell Y of algorithm II, at the input end of the
// array, where the operand stream is copied.
//
// The incoming operand bit is latched once and then sent on both operand
// lines (it becomes the slow and the fast copy). Its square a_i*a_i, which
// for a single bit is a_i itself, has half the weight of the products formed
// in the other cells, so it is placed one result position lower: with the
// result lines of the next cell crossed, that means driving it on the upper
// result line while the lower line starts at zero (no partial product exists
// yet at this end). The cell's own result latch is left out and its neighbour
// supplies the extra latch instead, so all four outputs come straight from
// the one input flip-flop.
//
// Interface: serial operand a_in (one bit per cycle, least significant
// first); link_out to the first internal cell. Latency: one cycle.
//
// Follows the drawing of cell Y of algorithm II; the synchronous reset is
// this design's own addition.
module alg2_special
  import bsq_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       a_in,
  output alg2_link_t link_out
);

  logic a_q;

  always_ff @(posedge clk) begin
    if (rst) a_q <= 1'b0;
    else     a_q <= a_in;
  end

  always_comb begin
    link_out.a_slow = a_q;
    link_out.p_hi   = a_q;     // a_i * a_i = a_i for bits
    link_out.p_lo   = 1'b0;    // no partial product enters at this end
    link_out.a_fast = a_q;
  end

endmodule
