// alg2_io: I/O cell for the algorithm II squarer (alg2_array). It turns a
// parallel operand into the array's serial input and gathers the two serial
// result lines at the far end of the array back into a parallel square.
//
// Input side: an operand is taken when in_valid and in_ready are both high,
// then sent least significant bit first, one bit per cycle, followed by
// zeros until PERIOD = 2N - 1 cycles have passed. That leaves the N - 1 zero
// bits needed between successive operands. A new operand can be taken in the
// last cycle of a period, so back-to-back operands start PERIOD cycles apart.
//
// Output side: the first result bits reach the far end D = floor(3N/2)
// cycles after the first operand bit was sent. This is later than the next
// operand may start, so a start marker travels through a D-stage shift
// register alongside the array and starts the gathering of that
// computation's result. For even N each of the next N cycles delivers p_2i on
// p_lo and p_2i+1 on p_hi. For odd N the two lines are half a step apart: p_2i
// arrives on p_hi and p_2i+1 on p_lo one cycle later, so N + 1 cycles are
// gathered. The square then appears on out_sq with a one-cycle out_valid
// pulse and stays until the next result. There is no back-pressure on the
// result side.
//
// The serial format, zero padding, period and output timing follow the
// analysis of algorithm II. How the I/O cell is built (handshake, shift
// registers, start marker, reset) is this design's own choice.
module alg2_io #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst,
  // parallel operand side
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [N-1:0]   in_op,
  // serial side, to and from the array
  output logic           a_ser,
  input  logic           p_hi,
  input  logic           p_lo,
  // parallel result side
  output logic           out_valid,
  output logic [2*N-1:0] out_sq
);

  localparam int unsigned PERIOD = 2 * N - 1;
  localparam int unsigned D      = (3 * N) / 2;
  localparam int unsigned ODD    = N % 2;
  localparam int unsigned NOUT   = N + ODD;      // cycles of result bits
  localparam int unsigned CW     = $clog2(PERIOD + 1);
  localparam int unsigned OW     = $clog2(NOUT + 1);

  logic              busy;
  logic [CW-1:0]     cnt;
  logic [N-1:0]      sh;
  logic              last, take;
  logic [D-1:0]      mark;       // start markers, one stage per cycle
  logic              ocoll;      // gathering a result
  logic [OW-1:0]     ocnt;
  logic [2*NOUT-3:0] acc;        // gathered bits, all but the newest pair
  logic [2*NOUT-1:0] acc_next;

  assign last     = busy && (cnt == CW'(PERIOD - 1));
  assign in_ready = !busy || last;
  assign take     = in_valid && in_ready;
  assign a_ser    = busy & sh[0];
  assign acc_next = {p_hi, p_lo, acc};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      cnt       <= '0;
      sh        <= '0;
      mark      <= '0;
      ocoll     <= 1'b0;
      ocnt      <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_sq    <= '0;
    end else begin
      out_valid <= 1'b0;
      // input side
      if (take) begin
        busy <= 1'b1;
        cnt  <= '0;
        sh   <= in_op;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        sh  <= sh >> 1;
        if (last) busy <= 1'b0;
      end
      // a marker enters when the first operand bit is on a_ser, i.e. the
      // cycle after the operand was taken
      mark <= {mark[D-2:0], busy && (cnt == '0)};
      // output side
      if (mark[D-1]) begin
        ocoll <= 1'b1;
        ocnt  <= OW'(1);
        acc   <= acc_next[2*NOUT-1:2];
      end else if (ocoll) begin
        acc  <= acc_next[2*NOUT-1:2];
        ocnt <= ocnt + 1'b1;
        if (ocnt == OW'(NOUT - 1)) begin
          ocoll     <= 1'b0;
          out_valid <= 1'b1;
          out_sq    <= acc_next[2*N-1+ODD:ODD];
        end
      end
    end
  end

  // a result is presented for exactly one cycle
  a_pulse: assert property (@(posedge clk) disable iff (rst) out_valid |=> !out_valid);
  // the result windows of successive operands never overlap
  a_window: assert property (@(posedge clk) disable iff (rst) mark[D-1] |-> !ocoll);

endmodule
