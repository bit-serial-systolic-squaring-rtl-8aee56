// tb_squarer_top: end-to-end test of both squarers at their default size
// (N = 16), through the parallel ports of the top.
//
// Random operands (and the corner values 0, 1, the top bit alone and all
// ones) are offered on both sides. Stretches where the operand is held
// valid test back-to-back starts, and stretches where valid is low test idle
// gaps. Algorithm I is given both single and dual (two operands at once)
// computations. Every result is compared, in order, with the square computed
// here. The cycles from taking an operand to its result are checked against
// 3N + 1 (algorithm I) and floor(5N/2) + 1 (algorithm II), and the spacing
// of back-to-back starts against the periods 4N - 2 and 2N - 1. Each of
// these events (single, dual, back-to-back and after-a-gap starts on each
// side) is counted, and one that never happened counts as a failure.
module tb_squarer_top;

  localparam int N  = 16;
  localparam int P1 = 4 * N - 2;
  localparam int P2 = 2 * N - 1;
  localparam int L1 = 3 * N + 1;
  localparam int L2 = (5 * N) / 2 + 1;
  localparam int K1 = 24;
  localparam int K2 = 40;

  logic           clk = 1'b0;
  logic           rst;
  logic           a1_valid, a1_ready, a1_dual, s1_valid, s1_dual;
  logic [N-1:0]   a1_op0, a1_op1;
  logic [2*N-1:0] s1_sq0, s1_sq1;
  logic           a2_valid, a2_ready, s2_valid;
  logic [N-1:0]   a2_op;
  logic [2*N-1:0] s2_sq;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n1_single = 0, n1_dual = 0, n1_b2b = 0, n1_gap = 0;
  int n2_b2b = 0, n2_gap = 0;
  int n1_res = 0, n2_res = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  squarer_top dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] operand(int k);
    case (k % 17)
      0: return '0;
      1: return N'(1);
      2: return {1'b1, {(N-1){1'b0}}};
      3: return '1;
      default: return N'($urandom);
    endcase
  endfunction

  function automatic void check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("cycle %0d: %s", cyc, what);
    end
  endfunction

  // ---------------- algorithm I ----------------
  logic [N-1:0] q1_op0 [$], q1_op1 [$];
  logic         q1_dual [$];
  int           q1_at [$];

  initial begin
    int k, last;
    k = 0; last = -1;
    a1_valid = 0; a1_dual = 0; a1_op0 = '0; a1_op1 = '0;
    @(negedge rst);
    while (k < K1) begin
      @(negedge clk);
      // valid held for a while, then dropped for a while
      a1_valid = ((k / 6) % 2 == 0) || ($urandom % 8 == 0);
      a1_dual  = (k % 3) != 0;
      a1_op0   = operand(k);
      a1_op1   = operand(k + 5);
      @(posedge clk);
      if (a1_valid && a1_ready) begin
        q1_op0.push_back(a1_op0);
        q1_op1.push_back(a1_dual ? a1_op1 : '0);
        q1_dual.push_back(a1_dual);
        q1_at.push_back(cyc + L1);
        if (a1_dual) n1_dual++; else n1_single++;
        if (last >= 0) begin
          check("algorithm I operands taken too close", cyc - last >= P1);
          if (cyc - last == P1) n1_b2b++; else n1_gap++;
        end
        last = cyc;
        k++;
      end
    end
    @(negedge clk);
    a1_valid = 0;
  end

  always @(posedge clk) if (!rst && s1_valid) begin
    logic [N-1:0] o0, o1;
    if (q1_op0.size() == 0) check("algorithm I result with nothing pending", 1'b0);
    else begin
      o0 = q1_op0.pop_front(); o1 = q1_op1.pop_front();
      check("algorithm I first square", s1_sq0 == (2*N)'(o0) * (2*N)'(o0));
      check("algorithm I second square", s1_sq1 == (2*N)'(o1) * (2*N)'(o1));
      check("algorithm I dual flag", s1_dual == q1_dual.pop_front());
      check("algorithm I result timing", cyc == q1_at.pop_front());
      n1_res++;
    end
  end

  // ---------------- algorithm II ----------------
  logic [N-1:0] q2_op [$];
  int           q2_at [$];

  initial begin
    int k, last;
    k = 0; last = -1;
    a2_valid = 0; a2_op = '0;
    @(negedge rst);
    while (k < K2) begin
      @(negedge clk);
      a2_valid = ((k / 8) % 2 == 0) || ($urandom % 16 == 0);
      a2_op    = operand(k + 2);
      @(posedge clk);
      if (a2_valid && a2_ready) begin
        q2_op.push_back(a2_op);
        q2_at.push_back(cyc + L2);
        if (last >= 0) begin
          check("algorithm II operands taken too close", cyc - last >= P2);
          if (cyc - last == P2) n2_b2b++; else n2_gap++;
        end
        last = cyc;
        k++;
      end
    end
    @(negedge clk);
    a2_valid = 0;
  end

  always @(posedge clk) if (!rst && s2_valid) begin
    logic [N-1:0] o;
    if (q2_op.size() == 0) check("algorithm II result with nothing pending", 1'b0);
    else begin
      o = q2_op.pop_front();
      check("algorithm II square", s2_sq == (2*N)'(o) * (2*N)'(o));
      check("algorithm II result timing", cyc == q2_at.pop_front());
      n2_res++;
    end
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (n1_res == K1 && n2_res == K2);
    repeat (4 * P1) @(posedge clk);   // no further results may appear
    check("algorithm I result count", n1_res == K1);
    check("algorithm II result count", n2_res == K2);
    check("algorithm I single computations happened", n1_single > 0);
    check("algorithm I dual computations happened", n1_dual > 0);
    check("algorithm I back-to-back starts happened", n1_b2b > 0);
    check("algorithm I starts after a gap happened", n1_gap > 0);
    check("algorithm II back-to-back starts happened", n2_b2b > 0);
    check("algorithm II starts after a gap happened", n2_gap > 0);
    $display("alg I: single %0d dual %0d back-to-back %0d after gap %0d",
             n1_single, n1_dual, n1_b2b, n1_gap);
    $display("alg II: back-to-back %0d after gap %0d", n2_b2b, n2_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
