// tb_alg1_array: self-checking test of the algorithm I squaring array.
//
// Two arrays run side by side: one at its default size (8 cells, 16-bit
// operands) and one of 4 cells fed 7-bit operands (an odd length, zero
// extended). Operand bits go in every other cycle. Most operands are paired
// with a second, independent operand placed in the dummy slots one cycle
// behind it, so both computations share the array; some are sent alone, with
// zeros in the dummy slots. Successive operands start 4*CELLS + 2N - 2 cycles
// apart (4N - 2 for even N), which leaves the minimum N - 1 zero bits
// between them, with one longer gap. Every result bit is checked against the
// square computed here in integer arithmetic, at the cycle and on the line
// the timing rules give: p_2i on p_lo and p_2i+1 on p_hi in cycle
// start + 2*CELLS + 2i (start + 1 + ... for the second operand), which also
// checks the delay of 2*CELLS (= n) cycles.
module tb_alg1_array;

  localparam int CA = 8,  NA = 16;
  localparam int CB = 4,  NB = 7;
  localparam int K  = 8;
  localparam int T  = 600;

  logic clk = 1'b0;
  logic rst;
  logic ain_a, ain_b;
  logic hi_a, lo_a, hi_b, lo_b;
  int   checks = 0, failures = 0;
  int   dual_runs = 0;

  always #5 clk = ~clk;

  alg1_array u_a (.clk(clk), .rst(rst), .a_in(ain_a), .p_hi(hi_a), .p_lo(lo_a));
  alg1_array #(.CELLS(CB)) u_b (.clk(clk), .rst(rst), .a_in(ain_b), .p_hi(hi_b), .p_lo(lo_b));

  logic [63:0] op0_a [K], op1_a [K], op0_b [K], op1_b [K];
  logic        dl_a [K], dl_b [K];
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

  function automatic logic [63:0] pick(int n, int k, int which);
    logic [63:0] m;
    m = (64'd1 << n) - 1;
    case (k)
      0: return which == 0 ? m : m;
      1: return which == 0 ? 64'd0 : m;
      2: return which == 0 ? 64'd1 << (n - 1) : 64'd1;
      default: return {$urandom, $urandom} & m;
    endcase
  endfunction

  task automatic plan(input int c, input int n, output logic [63:0] op0 [K],
                      output logic [63:0] op1 [K], output logic dl [K], output int st [K],
                      output logic stream [T]);
    int s;
    for (int t = 0; t < T; t++) stream[t] = 1'b0;
    s = 0;
    for (int k = 0; k < K; k++) begin
      op0[k] = pick(n, k, 0);
      dl[k]  = (k % 3) != 2;
      op1[k] = dl[k] ? pick(n, k, 1) : 64'd0;
      st[k]  = s;
      for (int i = 0; i < n; i++) begin
        stream[s+2*i]   = op0[k][i];
        stream[s+2*i+1] = op1[k][i];
      end
      s += 4 * c + 2 * n - 2 + ((k == 4) ? 6 : 0);
    end
  endtask

  task automatic verify(input string name, input int c, input int n,
                        input logic [63:0] op0 [K], input logic [63:0] op1 [K],
                        input logic dl [K], input int st [K],
                        input logic rh [T], input logic rl [T]);
    logic [63:0] sq;
    int cyc;
    logic got;
    for (int k = 0; k < K; k++) begin
      for (int w = 0; w < 2; w++) begin
        sq = (w == 0) ? op0[k] * op0[k] : op1[k] * op1[k];
        if (w == 1 && dl[k]) dual_runs++;
        for (int j = 0; j < 2 * n; j++) begin
          cyc = st[k] + w + 2 * c + 2 * (j / 2);
          got = (j % 2 == 0) ? rl[cyc] : rh[cyc];
          checks++;
          if (got !== sq[j]) begin
            failures++;
            if (failures < 10)
              $display("%s: operand %0d.%0d bit p_%0d at cycle %0d: got %0b want %0b",
                       name, k, w, j, cyc, got, sq[j]);
          end
        end
      end
    end
  endtask

  initial begin
    plan(CA, NA, op0_a, op1_a, dl_a, st_a, in_a);
    plan(CB, NB, op0_b, op1_b, dl_b, st_b, in_b);
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
    verify("8 cells", CA, NA, op0_a, op1_a, dl_a, st_a, rh_a, rl_a);
    verify("4 cells", CB, NB, op0_b, op1_b, dl_b, st_b, rh_b, rl_b);
    checks++;
    if (dual_runs == 0) begin
      failures++;
      $display("no dual computation was run");
    end
    $display("dual computations checked: %0d", dual_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
