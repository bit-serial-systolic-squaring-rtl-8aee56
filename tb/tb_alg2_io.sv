// tb_alg2_io: self-checking test of the algorithm II I/O cell.
//
// The testbench plays the array: it checks every cycle that the serial
// operand line carries the accepted operand's bits, least significant first,
// followed by zeros, and drives the two result lines with the bits of the
// square (computed here) at the cycles and on the lines the array would
// deliver them. It then checks that each square appears on out_sq with
// out_valid in the expected cycle, that back-to-back operands are taken
// exactly 2N-1 cycles apart, and that an idle gap is handled. Two sizes
// run: the default N = 16 and an odd N = 7.
module tb_alg2_io;

  logic clk = 1'b0;
  logic rst;
  int   checks = 0, failures = 0;
  int   done = 0;
  int   back_to_back = 0, gaps = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 2; g++) begin : g_size
    localparam int N    = (g == 0) ? 16 : 7;
    localparam int P    = 2 * N - 1;
    localparam int D    = (3 * N) / 2;
    localparam int NOUT = N + N % 2;
    localparam int T    = 600;
    localparam int K    = 10;

    logic           in_valid, in_ready, a_ser, p_hi, p_lo, out_valid;
    logic [N-1:0]   in_op;
    logic [2*N-1:0] out_sq;

    if (g == 0) begin : g_dut
      alg2_io u_io (.clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready), .in_op(in_op),
                    .a_ser(a_ser), .p_hi(p_hi), .p_lo(p_lo), .out_valid(out_valid), .out_sq(out_sq));
    end else begin : g_dut
      alg2_io #(.N(N)) u_io (.clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready),
                    .in_op(in_op), .a_ser(a_ser), .p_hi(p_hi), .p_lo(p_lo),
                    .out_valid(out_valid), .out_sq(out_sq));
    end

    logic         exp_ser [T + 200];
    logic         drv_hi [T + 200], drv_lo [T + 200];
    logic [63:0]  exp_sq [K];
    int           exp_at [K];

    initial begin
      int k, nout, last_start, start;
      logic [63:0] op, sq;
      for (int t = 0; t < T + 200; t++) begin exp_ser[t] = 0; drv_hi[t] = 0; drv_lo[t] = 0; end
      k = 0; nout = 0; last_start = -1;
      in_valid = 0; in_op = '0; p_hi = 0; p_lo = 0;
      rst = 1'b1;
      @(posedge clk); #1 rst = 1'b0;
      for (int cyc = 0; cyc < T; cyc++) begin
        // an idle stretch after the fourth operand
        in_valid = (k < K) && !(k == 4 && cyc < 4 * P + 10);
        op = (k == 0) ? 64'(~0) & ((64'd1 << N) - 1) : {$urandom, $urandom} & ((64'd1 << N) - 1);
        in_op = N'(op);
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
          if (nout >= k || exp_at[nout] != cyc || 64'(out_sq) !== exp_sq[nout]) begin
            failures++;
            if (failures < 10) $display("N=%0d cycle %0d: result 0x%0h", N, cyc, out_sq);
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
          sq = op * op;
          for (int i = 0; i < N; i++) exp_ser[start + i] = op[i];
          for (int j = 0; j < 2 * N; j++) begin
            if (N % 2 == 0) begin
              if (j % 2 == 0) drv_lo[start + D + j / 2] = sq[j];
              else            drv_hi[start + D + j / 2] = sq[j];
            end else begin
              if (j % 2 == 0) drv_hi[start + D + j / 2] = sq[j];
              else            drv_lo[start + D + (j + 1) / 2] = sq[j];
            end
          end
          exp_sq[k] = sq;
          exp_at[k] = start + D + NOUT;
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
    if (back_to_back == 0 || gaps == 0) begin
      failures++;
      $display("back-to-back starts %0d, starts after a gap %0d", back_to_back, gaps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
