// tb_alg2_array: self-checking test of the algorithm II squaring array.
//
// Two arrays run side by side: one at its default size (N = 16) and one with
// an odd operand length (N = 7), whose result lines are offset by half a
// step. Each gets a sequence of operands (corner values and random ones),
// mostly back to back with the minimum N-1 zero bits between them, plus
// one longer gap. Every result bit p_j of every operand is checked against
// the square computed here in plain integer arithmetic, at the cycle and on
// the line the array's timing rules give:
//   N even: p_2i on p_lo, p_2i+1 on p_hi, cycle start + floor(3N/2) + i
//   N odd : p_2i on p_hi at start + D + i, p_2i+1 on p_lo at start + D + i + 1
// so the delay floor(3N/2) and the period 2N-1 are checked with the values.
module tb_alg2_array;

  localparam int NA = 16;
  localparam int NB = 7;
  localparam int K  = 8;          // operands per array
  localparam int T  = 400;        // cycles recorded

  logic clk = 1'b0;
  logic rst;
  logic ain_a, ain_b;
  logic hi_a, lo_a, hi_b, lo_b;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  alg2_array u_a (.clk(clk), .rst(rst), .a_in(ain_a), .p_hi(hi_a), .p_lo(lo_a));
  alg2_array #(.N(NB)) u_b (.clk(clk), .rst(rst), .a_in(ain_b), .p_hi(hi_b), .p_lo(lo_b));

  logic [63:0] ops_a [K], ops_b [K];
  int          st_a [K], st_b [K];
  logic        in_a [T], in_b [T];
  logic        rh_a [T], rl_a [T], rh_b [T], rl_b [T];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Build an input stream: operands at the given starts, zeros elsewhere.
  task automatic plan(input int n, output logic [63:0] ops [K], output int st [K],
                      output logic stream [T]);
    int s;
    for (int t = 0; t < T; t++) stream[t] = 1'b0;
    s = 0;
    for (int k = 0; k < K; k++) begin
      case (k)
        0: ops[k] = (64'd1 << n) - 1;            // all ones
        1: ops[k] = 64'd0;
        2: ops[k] = 64'd1 << (n - 1);            // top bit only
        3: ops[k] = 64'd1;
        default: ops[k] = {$urandom, $urandom} & ((64'd1 << n) - 1);
      endcase
      st[k] = s;
      for (int i = 0; i < n; i++) stream[s+i] = ops[k][i];
      s += (k == 5) ? 2 * n + 3 : 2 * n - 1;      // one longer gap
    end
  endtask

  task automatic verify(input string name, input int n, input logic [63:0] ops [K],
                        input int st [K], input logic rh [T], input logic rl [T]);
    int d, cyc;
    logic [63:0] sq;
    logic got;
    d = (3 * n) / 2;
    for (int k = 0; k < K; k++) begin
      sq = ops[k] * ops[k];
      for (int j = 0; j < 2 * n; j++) begin
        if (n % 2 == 0) begin
          cyc = st[k] + d + j / 2;
          got = (j % 2 == 0) ? rl[cyc] : rh[cyc];
        end else begin
          cyc = st[k] + d + (j + 1) / 2;
          got = (j % 2 == 0) ? rh[cyc] : rl[cyc];
        end
        checks++;
        if (got !== sq[j]) begin
          failures++;
          if (failures < 10)
            $display("%s: operand %0d (0x%0h) bit p_%0d at cycle %0d: got %0b want %0b",
                     name, k, ops[k], j, cyc, got, sq[j]);
        end
      end
    end
  endtask

  initial begin
    plan(NA, ops_a, st_a, in_a);
    plan(NB, ops_b, st_b, in_b);
    rst = 1'b1; ain_a = 1'b0; ain_b = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < T; t++) begin
      ain_a = in_a[t];
      ain_b = in_b[t];
      #3;
      rh_a[t] = hi_a; rl_a[t] = lo_a; rh_b[t] = hi_b; rl_b[t] = lo_b;
      @(posedge clk);
      #1;
    end
    verify("N=16", NA, ops_a, st_a, rh_a, rl_a);
    verify("N=7", NB, ops_b, st_b, rh_b, rl_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
