// alg2_array: the algorithm II bit-serial squarer, the copying special cell
// (alg2_special) followed by N-1 internal cells (alg2_cell).
//
// Operand bits enter at the left end, one per cycle, least significant first
// (a_i in cycle i), with no dummies. The special cell copies the stream into
// a slow copy (two latches per cell) and a fast copy (one latch per cell);
// the fast copy overtakes the slow one, so every pair a_i, a_j meets, and
// each internal cell adds one product bit per cycle into the result stream.
// The result stream moves right as two lines, three latches per two cells,
// and leaves at the far end.
//
// Timing, with a_0 presented in cycle 0 and D = floor(3N/2):
//   N even: p_2i on p_lo and p_2i+1 on p_hi, both in cycle D + i;
//   N odd : p_2i on p_hi in cycle D + i, p_2i+1 on p_lo in cycle D + i + 1.
// Successive squarings need at least N-1 zero bits between operands, i.e.
// one start every 2N-1 cycles. The array squares an N-bit operand; shorter
// operands are zero-extended to N bits.
//
// The cell arrangement (Y then n-1 cells X, results at the far end) follows
// the algorithm II drawing; N defaults to 16, a size this design chose.
module alg2_array
  import bsq_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic clk,
  input  logic rst,
  input  logic a_in,
  output logic p_hi,
  output logic p_lo
);

  // link[k] : lines leaving cell k (cell 0 is the special cell)
  alg2_link_t link [N];

  alg2_special u_special (
    .clk     (clk),
    .rst     (rst),
    .a_in    (a_in),
    .link_out(link[0])
  );

  for (genvar k = 1; k < N; k++) begin : g_cell
    alg2_cell u_cell (
      .clk     (clk),
      .rst     (rst),
      .link_in (link[k-1]),
      .link_out(link[k])
    );
  end

  assign p_hi = link[N-1].p_hi;
  assign p_lo = link[N-1].p_lo;

endmodule
