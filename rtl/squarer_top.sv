// squarer_top: the two bit-serial systolic squarers, side by side, each
// behind its I/O cell so that both take a parallel N-bit operand and return
// its parallel 2N-bit square.
//
// Algorithm I (ports a1_*/s1_*): a linear array of ceil(N/2) cells. The
// operand goes in and the square comes out at the same end, and the operand
// is reflected at the far end. Operand bits occupy every other cycle. The
// free slots can carry a second operand, so with a1_dual set the unit
// squares two operands at once. A new operand (pair) can start every
// 4N - 2 cycles (even N). Each square is ready 3N + 1 cycles after the
// operand is taken (even N): 3N - 1 cycles of computation, plus one cycle to
// take the operand and one to register the result.
//
// Algorithm II (ports a2_*/s2_*): a linear array of N cells. The operand
// goes in at one end, is copied into a slow and a fast stream, and the square
// comes out at the other end. A new operand can start every 2N - 1 cycles.
// Each square is ready floor(5N/2) + 1 cycles after the operand is taken
// (even N): the computation, plus one cycle to take the operand and one to
// register the result.
//
// Both sides use the same handshake: an operand is taken in a cycle where
// valid and ready are both high. A result is presented with a one-cycle
// valid pulse and held until the next result.
//
// Arrays and cells follow the two algorithms as drawn; the I/O cells and the
// default N = 16 are this design's own choices.
module squarer_top #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst,
  // algorithm I
  input  logic           a1_valid,
  output logic           a1_ready,
  input  logic           a1_dual,
  input  logic [N-1:0]   a1_op0,
  input  logic [N-1:0]   a1_op1,
  output logic           s1_valid,
  output logic           s1_dual,
  output logic [2*N-1:0] s1_sq0,
  output logic [2*N-1:0] s1_sq1,
  // algorithm II
  input  logic           a2_valid,
  output logic           a2_ready,
  input  logic [N-1:0]   a2_op,
  output logic           s2_valid,
  output logic [2*N-1:0] s2_sq
);

  logic ser1, hi1, lo1;
  logic ser2, hi2, lo2;

  alg1_io #(.N(N)) u_io1 (
    .clk      (clk),
    .rst      (rst),
    .in_valid (a1_valid),
    .in_ready (a1_ready),
    .in_dual  (a1_dual),
    .in_op0   (a1_op0),
    .in_op1   (a1_op1),
    .a_ser    (ser1),
    .p_hi     (hi1),
    .p_lo     (lo1),
    .out_valid(s1_valid),
    .out_dual (s1_dual),
    .out_sq0  (s1_sq0),
    .out_sq1  (s1_sq1)
  );

  alg1_array #(.CELLS((N + 1) / 2)) u_arr1 (
    .clk (clk),
    .rst (rst),
    .a_in(ser1),
    .p_hi(hi1),
    .p_lo(lo1)
  );

  alg2_io #(.N(N)) u_io2 (
    .clk      (clk),
    .rst      (rst),
    .in_valid (a2_valid),
    .in_ready (a2_ready),
    .in_op    (a2_op),
    .a_ser    (ser2),
    .p_hi     (hi2),
    .p_lo     (lo2),
    .out_valid(s2_valid),
    .out_sq   (s2_sq)
  );

  alg2_array #(.N(N)) u_arr2 (
    .clk (clk),
    .rst (rst),
    .a_in(ser2),
    .p_hi(hi2),
    .p_lo(lo2)
  );

endmodule
