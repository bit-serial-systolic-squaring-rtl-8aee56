// tb_alg1_io: self-checking test of the algorithm I I/O cell.
//
// The testbench plays the array: it checks every cycle that the serial
// operand line carries the first operand's bits in the even cycles of a
// computation and the second operand's bits (dual mode) or zeros in the odd
// ones, then zeros until the period ends. It drives the two result lines
// with the bits of the squares (computed here) at the cycles the array would
// deliver them, and checks that both squares appear with out_valid in the
// expected cycle. It also checks that back-to-back operands are taken exactly
// 4*CELLS + 2N - 2 cycles apart, that an idle gap is handled, and that both
// single and dual computations occur. Two sizes run: the default N = 16 and
// an odd N = 7.
module tb_alg1_io;

  logic clk = 1'b0;
  logic rst;
  int   checks = 0, failures = 0;
  int   done = 0;
  int   back_to_back = 0, gaps = 0, duals = 0, singles = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 2; g++) begin : g_size
    localparam int N = (g == 0) ? 16 : 7;
    localparam int C = (N + 1) / 2;
    localparam int P = 4 * C + 2 * N - 2;
    localparam int D = 2 * C;
    localparam int T = 1000;
    localparam int K = 10;

    logic           in_valid, in_ready, in_dual, a_ser, p_hi, p_lo, out_valid, out_dual;
    logic [N-1:0]   in_op0, in_op1;
    logic [2*N-1:0] out_sq0, out_sq1;

    if (g == 0) begin : g_dut
      alg1_io u_io (.clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready),
                    .in_dual(in_dual), .in_op0(in_op0), .in_op1(in_op1), .a_ser(a_ser),
                    .p_hi(p_hi), .p_lo(p_lo), .out_valid(out_valid), .out_dual(out_dual),
                    .out_sq0(out_sq0), .out_sq1(out_sq1));
    end else begin : g_dut
      alg1_io #(.N(N)) u_io (.clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready),
                    .in_dual(in_dual), .in_op0(in_op0), .in_op1(in_op1), .a_ser(a_ser),
                    .p_hi(p_hi), .p_lo(p_lo), .out_valid(out_valid), .out_dual(out_dual),
                    .out_sq0(out_sq0), .out_sq1(out_sq1));
    end

    logic         exp_ser [T + 300];
    logic         drv_hi [T + 300], drv_lo [T + 300];
    logic [63:0]  exp_sq0 [K], exp_sq1 [K];
    logic         exp_dual [K];
    int           exp_at [K];

    initial begin
      int k, nout, last_start, start;
      logic [63:0] op0, op1, sq0, sq1;
      logic dl;
      for (int t = 0; t < T + 300; t++) begin exp_ser[t] = 0; drv_hi[t] = 0; drv_lo[t] = 0; end
      k = 0; nout = 0; last_start = -1;
      in_valid = 0; in_dual = 0; in_op0 = '0; in_op1 = '0; p_hi = 0; p_lo = 0;
      rst = 1'b1;
      @(posedge clk); #1 rst = 1'b0;
      for (int cyc = 0; cyc < T; cyc++) begin
        in_valid = (k < K) && !(k == 3 && cyc < 3 * P + 7);
        dl  = (k % 3) != 1;
        op0 = (k == 0) ? (64'd1 << N) - 1 : {$urandom, $urandom} & ((64'd1 << N) - 1);
        op1 = (k == 0) ? (64'd1 << N) - 1 : {$urandom, $urandom} & ((64'd1 << N) - 1);
        in_dual = dl;
        in_op0 = N'(op0);
        in_op1 = N'(op1);
        if (!dl) op1 = 64'd0;
        p_hi = drv_hi[cyc];
        p_lo = drv_lo[cyc];
        #2;
        checks++;
        if (a_ser !== exp_ser[cyc]) begin
          failures++;
          if (failures < 10) $display("N=%0d cycle %0d: a_ser=%0b want %0b", N, cyc, a_ser, exp_ser[cyc]);
        end
        if (out_valid) begin
          checks++;
          if (nout >= k || exp_at[nout] != cyc || 64'(out_sq0) !== exp_sq0[nout] ||
              64'(out_sq1) !== exp_sq1[nout] || out_dual !== exp_dual[nout]) begin
            failures++;
            if (failures < 10)
              $display("N=%0d cycle %0d: results 0x%0h 0x%0h dual %0b", N, cyc, out_sq0, out_sq1, out_dual);
          end
          nout++;
        end
        if (in_valid && in_ready) begin
          start = cyc + 1;
          if (last_start >= 0) begin
            checks++;
            if (start - last_start == P) back_to_back++;
            else if (start - last_start > P) gaps++;
            else begin failures++; $display("N=%0d operands only %0d cycles apart", N, start - last_start); end
          end
          last_start = start;
          if (dl) duals++; else singles++;
          sq0 = op0 * op0;
          sq1 = op1 * op1;
          for (int i = 0; i < N; i++) begin
            exp_ser[start + 2 * i]     = op0[i];
            exp_ser[start + 2 * i + 1] = op1[i];
          end
          for (int i = 0; i < N; i++) begin
            drv_lo[start + D + 2 * i]     = sq0[2 * i];
            drv_hi[start + D + 2 * i]     = sq0[2 * i + 1];
            drv_lo[start + D + 2 * i + 1] = sq1[2 * i];
            drv_hi[start + D + 2 * i + 1] = sq1[2 * i + 1];
          end
          exp_sq0[k]  = sq0;
          exp_sq1[k]  = sq1;
          exp_dual[k] = dl;
          exp_at[k]   = start + D + 2 * N;
          k++;
        end
        @(posedge clk);
        #1;
      end
      checks++;
      if (nout != K) begin failures++; $display("N=%0d: %0d of %0d results", N, nout, K); end
      done++;
    end
  end

  initial begin
    wait (done == 2);
    checks++;
    if (back_to_back == 0 || gaps == 0 || duals == 0 || singles == 0) begin
      failures++;
      $display("back-to-back %0d, after gap %0d, dual %0d, single %0d", back_to_back, gaps, duals, singles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
