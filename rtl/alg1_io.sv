// alg1_io: I/O cell for the algorithm I squarer (alg1_array). It turns a
// parallel operand into the array's serial input format and gathers the two
// serial result lines back into a parallel square.
//
// Input side: an operand is taken when in_valid and in_ready are both high.
// Its bits are then sent least significant first, one every other cycle
// (cycles 0, 2, 4, ... of the computation), with the slots in between
// (cycles 1, 3, 5, ...) carrying dummies. With in_dual set a second operand
// in_op1 travels in those dummy slots, one cycle behind the first: the array
// then computes two independent squares at once. After the N bits come
// zeros until the computation's period PERIOD = 4*CELLS + 2N - 2 cycles has
// passed (4N - 2 for even N). That leaves N - 1 zero bits between
// successive operands, the least that keeps two computations apart. A new
// operand can be taken in the last cycle of a period, so back-to-back
// operands start exactly PERIOD cycles apart.
//
// Output side: result bits p_2i (line p_lo) and p_2i+1 (line p_hi) of the
// first operand arrive in cycle D + 2i of the computation, D = 2*CELLS, and
// those of the second operand one cycle later. They are shifted into one
// accumulator per operand. When the last bit is in, the squares appear on
// out_sq0/out_sq1 with a one-cycle out_valid pulse, D + 2N cycles after the
// computation started; they stay until the next result. There is no
// back-pressure on the result side.
//
// The serial format, the zero padding, the period and the use of the dummy
// slots for a second computation follow the analysis of algorithm I. How the
// I/O cell is built (handshake, shift registers, counter, reset) is this
// design's own choice.
module alg1_io #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst,
  // parallel operand side
  input  logic           in_valid,
  output logic           in_ready,
  input  logic           in_dual,
  input  logic [N-1:0]   in_op0,
  input  logic [N-1:0]   in_op1,
  // serial side, to and from the array
  output logic           a_ser,
  input  logic           p_hi,
  input  logic           p_lo,
  // parallel result side
  output logic           out_valid,
  output logic           out_dual,
  output logic [2*N-1:0] out_sq0,
  output logic [2*N-1:0] out_sq1
);

  localparam int unsigned CELLS  = (N + 1) / 2;
  localparam int unsigned D      = 2 * CELLS;
  localparam int unsigned PERIOD = 4 * CELLS + 2 * N - 2;
  localparam int unsigned CW     = $clog2(PERIOD);

  logic           busy;
  logic [CW-1:0]  cnt;         // cycle within the current computation
  logic           dual;
  logic [N-1:0]   sh0, sh1;    // operand bits still to send
  logic [2*N-1:0] acc0;        // result bits gathered so far, first operand
  logic [2*N-3:0] acc1;        // second operand, all but the last pair
  logic [2*N-1:0] acc1_next;
  logic           last;
  logic           take;
  logic           collect;

  assign acc1_next = {p_hi, p_lo, acc1};
  assign last     = busy && (cnt == CW'(PERIOD - 1));
  assign in_ready = !busy || last;
  assign take     = in_valid && in_ready;
  // result bits come in cycles D .. D + 2N - 1 of a computation
  assign collect  = busy && (cnt >= CW'(D)) && (cnt < CW'(D + 2 * N));

  // even cycles carry the first operand, odd cycles the second (or a dummy)
  always_comb begin
    if (!busy)       a_ser = 1'b0;
    else if (!cnt[0]) a_ser = sh0[0];
    else             a_ser = dual & sh1[0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      cnt       <= '0;
      dual      <= 1'b0;
      sh0       <= '0;
      sh1       <= '0;
      acc0      <= '0;
      acc1      <= '0;
      out_valid <= 1'b0;
      out_dual  <= 1'b0;
      out_sq0   <= '0;
      out_sq1   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (take) begin
        busy <= 1'b1;
        cnt  <= '0;
        dual <= in_dual;
        sh0  <= in_op0;
        sh1  <= in_dual ? in_op1 : '0;
      end else if (busy) begin
        cnt  <= cnt + 1'b1;
        if (last) busy <= 1'b0;
        if (!cnt[0]) sh0 <= sh0 >> 1;
        else         sh1 <= sh1 >> 1;
      end
      if (collect) begin
        if ((cnt[0] ^ D[0]) == 1'b0) acc0 <= {p_hi, p_lo, acc0[2*N-1:2]};
        else                         acc1 <= acc1_next[2*N-1:2];
        if (cnt == CW'(D + 2 * N - 1)) begin
          out_valid <= 1'b1;
          out_dual  <= dual;
          out_sq0   <= acc0;
          out_sq1   <= dual ? acc1_next : '0;
        end
      end
    end
  end

  // a result is presented for exactly one cycle
  a_pulse: assert property (@(posedge clk) disable iff (rst) out_valid |=> !out_valid);
  // no operand is taken while the previous one is still being sent
  a_take: assert property (@(posedge clk) disable iff (rst)
                           take |-> !busy || cnt == CW'(PERIOD - 1));

endmodule
