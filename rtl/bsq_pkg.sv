// bsq_pkg: types and arithmetic shared by the bit-serial systolic squarers.
//
// Both squaring arrays are built from single-bit multipliers (an AND gate,
// since the operands are bits) and full adders d:s = a + b + c, where d:s
// stands for 2*d + s. The full adder is given here as a function returning a
// {carry, sum} pair. The structs bundle the signals that cross a cell
// boundary, one field per line of the array drawings, so a cell's neighbour
// connection is a single port.
package bsq_pkg;

  // Carry and sum of a full adder: value = 2*c + s.
  typedef struct packed {
    logic c;
    logic s;
  } fa_t;

  function automatic fa_t full_add(input logic a, input logic b, input logic c);
    fa_t r;
    r.s = a ^ b ^ c;
    r.c = (a & b) | (a & c) | (b & c);
    return r;
  endfunction

  // Algorithm I: lines travelling right-to-left (towards the I/O end).
  //   a_ref : the reflected operand stream (three latches per cell)
  //   p_hi  : upper result line, odd-indexed result bits
  //   p_lo  : lower result line, even-indexed result bits
  typedef struct packed {
    logic a_ref;
    logic p_hi;
    logic p_lo;
  } alg1_back_t;

  // Algorithm II: the four lines running left-to-right between cells, in
  // drawing order from top to bottom.
  //   a_slow : operand copy passing two latches per cell
  //   p_hi   : upper result line
  //   p_lo   : lower result line
  //   a_fast : operand copy passing one latch per cell
  typedef struct packed {
    logic a_slow;
    logic p_hi;
    logic p_lo;
    logic a_fast;
  } alg2_link_t;

endpackage
