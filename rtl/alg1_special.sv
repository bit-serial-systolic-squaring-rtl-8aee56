// alg1_special: special cell Y of algorithm I, at the far end of the array,
// where the operand stream is reflected.
//
// An operand bit a_i entering from the left is latched (y1), passes a second
// latch (y2) and a third (y3) and leaves to the left as the reflected stream.
// While a_i sits in y1, y3 holds a_{i-1}, so the cell forms a_{i-1}*a_i (the
// product meets here only once, the lowest pair not met elsewhere) and
// a_i*a_i = a_i (the squarer of the drawing is just a wire for bits). The two
// are added in one half adder: the product a_i*a_i carries half the weight
// of every other product in the array, so it is placed one result position
// lower, beside a_{i-1}*a_i. Sum and carry leave through the lower and upper
// result latches as p''_{2i-1} and p''_{2i}. No partial product enters this
// cell (it is the end the results start from), and the carry c_{2i-1} from
// below is always zero, so no carry is stored.
//
// Interface: a_in from the left; back_out is the reflected operand and the
// two result lines travelling left. All outputs are registered; an operand
// bit spends three cycles in the cell.
//
// Structure and latch count follow the drawing of cell Y of algorithm I; the
// synchronous reset is this design's own addition.
module alg1_special
  import bsq_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       a_in,
  output alg1_back_t back_out
);

  logic y1, y2, y3;
  logic p_hi_q, p_lo_q;
  fa_t  h;

  always_comb h = full_add(y3 & y1, y1, 1'b0);

  always_ff @(posedge clk) begin
    if (rst) begin
      {y1, y2, y3, p_hi_q, p_lo_q} <= '0;
    end else begin
      y1     <= a_in;
      y2     <= y1;
      y3     <= y2;
      p_hi_q <= h.c;
      p_lo_q <= h.s;
    end
  end

  assign back_out.a_ref = y3;
  assign back_out.p_hi  = p_hi_q;
  assign back_out.p_lo  = p_lo_q;

endmodule
