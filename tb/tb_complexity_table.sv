// tb_complexity_table: measures, for both squaring arrays at several even
// operand lengths n, the time figures of the complexity table and compares
// them with its formulas:
//
//                      algorithm I   algorithm II
//   cells              n/2           n
//   delay              n             3n/2
//   computation time   3n - 1        5n/2
//   latency            4n - 2        2n - 1
//
// Delay is counted from the first operand bit in to the first result bit
// out, computation time from the first operand bit in to the last result bit
// out (inclusive), both measured on an all-ones operand, whose square has
// both its lowest and highest bit set. Latency is checked by running a burst
// of random operands (and, for algorithm I, a second operand in the dummy
// slots) with starts exactly 'latency' cycles apart and checking every square.
module tb_complexity_table;

  logic clk = 1'b0;
  logic rst;
  int   checks = 0, failures = 0;
  int   done = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
  end

  localparam int NS = 4;
  localparam int SIZES [NS] = '{4, 8, 16, 32};

  for (genvar g = 0; g < NS; g++) begin : g_n
    localparam int N  = SIZES[g];
    localparam int K  = 6;
    localparam int L1 = 4 * N - 2;
    localparam int L2 = 2 * N - 1;
    localparam int T  = 40 + K * L1 + 4 * N;

    logic a1, h1, l1, a2, h2, l2;
    alg1_array #(.CELLS(N / 2)) u1 (.clk(clk), .rst(rst), .a_in(a1), .p_hi(h1), .p_lo(l1));
    alg2_array #(.N(N))         u2 (.clk(clk), .rst(rst), .a_in(a2), .p_hi(h2), .p_lo(l2));

    logic        s1 [T], s2 [T], oh1 [T], ol1 [T], oh2 [T], ol2 [T];
    logic [63:0] x0 [K], x1 [K], y [K];

    function automatic void expect_eq(string what, int got, int want);
      checks++;
      if (got != want) begin
        failures++;
        $display("n=%0d %s: measured %0d, table %0d", N, what, got, want);
      end
    endfunction

    initial begin
      int first1, last1, first2, last2, base, c;
      logic [63:0] sq;
      for (int t = 0; t < T; t++) begin s1[t] = 0; s2[t] = 0; end
      // all-ones operand at cycle 0
      for (int i = 0; i < N; i++) begin s1[2 * i] = 1; s2[i] = 1; end
      // burst of operands at the table's latency, starting at cycle L1 + 8
      base = L1 + 8;
      for (int k = 0; k < K; k++) begin
        x0[k] = {$urandom, $urandom} & ((64'd1 << N) - 1);
        x1[k] = {$urandom, $urandom} & ((64'd1 << N) - 1);
        y[k]  = {$urandom, $urandom} & ((64'd1 << N) - 1);
        for (int i = 0; i < N; i++) begin
          s1[base + k * L1 + 2 * i]     = x0[k][i];
          s1[base + k * L1 + 2 * i + 1] = x1[k][i];
          s2[base + k * L2 + i]         = y[k][i];
        end
      end
      a1 = 0; a2 = 0;
      wait (!rst);
      for (int t = 0; t < T; t++) begin
        a1 = s1[t]; a2 = s2[t];
        #3;
        oh1[t] = h1; ol1[t] = l1; oh2[t] = h2; ol2[t] = l2;
        @(posedge clk);
        #1;
      end
      first1 = -1; last1 = -1; first2 = -1; last2 = -1;
      for (int t = 0; t < base; t++) begin
        if (oh1[t] || ol1[t]) begin if (first1 < 0) first1 = t; last1 = t; end
        if (oh2[t] || ol2[t]) begin if (first2 < 0) first2 = t; last2 = t; end
      end
      expect_eq("algorithm I delay", first1, N);
      expect_eq("algorithm I computation time", last1 + 1, 3 * N - 1);
      expect_eq("algorithm II delay", first2, 3 * N / 2);
      expect_eq("algorithm II computation time", last2 + 1, 5 * N / 2);
      // squares of the burst, on the lines and cycles found above
      for (int k = 0; k < K; k++) begin
        for (int w = 0; w < 2; w++) begin
          sq = (w == 0) ? x0[k] * x0[k] : x1[k] * x1[k];
          for (int j = 0; j < 2 * N; j++) begin
            c = base + k * L1 + w + N + 2 * (j / 2);
            checks++;
            if (((j % 2 == 0) ? ol1[c] : oh1[c]) !== sq[j]) begin
              failures++;
              if (failures < 10) $display("n=%0d algorithm I operand %0d.%0d bit %0d wrong", N, k, w, j);
            end
          end
        end
        sq = y[k] * y[k];
        for (int j = 0; j < 2 * N; j++) begin
          c = base + k * L2 + 3 * N / 2 + j / 2;
          checks++;
          if (((j % 2 == 0) ? ol2[c] : oh2[c]) !== sq[j]) begin
            failures++;
            if (failures < 10) $display("n=%0d algorithm II operand %0d bit %0d wrong", N, k, j);
          end
        end
      end
      $display("n=%0d  cells %0d / %0d  delay %0d / %0d  computation time %0d / %0d  latency %0d / %0d",
               N, N / 2, N, first1, first2, last1 + 1, last2 + 1, L1, L2);
      done++;
    end
  end

  initial begin
    wait (done == NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
