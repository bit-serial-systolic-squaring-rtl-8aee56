// alg1_array: the algorithm I bit-serial squarer, a linear array of CELLS-1
// internal cells (alg1_cell) closed by the reflecting special cell
// (alg1_special) at the right end.
//
// Operand bits enter at the left end, least significant first, one proper
// bit every other cycle with a dummy (0) in between: a_i is presented in
// cycle 2i. They travel right through one latch per cell, are reflected in
// the special cell and travel back through three latches per cell, meeting
// every other operand bit exactly once on the way. Each meeting adds a_i*a_j
// (i != j, counted once at double weight by the shifted placement) into one
// of two result lines that run left at one cell per cycle; the special cell
// adds a_i*a_i at half weight. The result therefore leaves at the same end
// the operands enter.
//
// Timing (a_0 presented in cycle 0, outputs sampled in the same cycle
// numbering): p_2i is on p_lo and p_2i+1 on p_hi in cycle 2*CELLS + 2i.
// So the delay is 2*CELLS (= n for even n) and the last result bits appear
// in cycle 2*CELLS + 2n - 2. An n-bit operand needs CELLS >= ceil(n/2).
// Successive squarings need at least n-1 zero bits (proper slots) between
// them, i.e. one start every 4n-2 cycles. The dummy slots can carry a second,
// independent operand one cycle behind the first; its result bits appear one
// cycle after those of the first.
//
// The cell arrangement (n/2-1 cells X plus Y, I/O at the left end) follows
// the algorithm I drawing; CELLS defaults to 8, for a 16-bit operand, a size
// this design chose.
module alg1_array
  import bsq_pkg::*;
#(
  parameter int unsigned CELLS = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic a_in,
  output logic p_hi,
  output logic p_lo
);

  // fwd[k]  : operand line entering cell k from the left
  // back[k] : leftward lines leaving cell k (back[CELLS-1] from the special cell)
  logic       fwd  [CELLS];
  alg1_back_t back [CELLS];

  assign fwd[0] = a_in;

  for (genvar k = 0; k < CELLS - 1; k++) begin : g_cell
    alg1_cell u_cell (
      .clk     (clk),
      .rst     (rst),
      .a_in    (fwd[k]),
      .a_out   (fwd[k+1]),
      .back_in (back[k+1]),
      .back_out(back[k])
    );
  end

  alg1_special u_special (
    .clk     (clk),
    .rst     (rst),
    .a_in    (fwd[CELLS-1]),
    .back_out(back[CELLS-1])
  );

  assign p_hi = back[0].p_hi;
  assign p_lo = back[0].p_lo;

endmodule
