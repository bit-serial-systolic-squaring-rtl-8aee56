// tb_alg2_cell: self-checking test of the algorithm II internal cell.
//
// Drives random bits on all four input lines and keeps a reference of the
// cell's state, updated with integer arithmetic: the lower result is
// (t2*b + pm + c) mod 2 where pm is the upper input line one cycle earlier;
// the upper result is (lower input line + carry of the lower sum) mod 2, and
// that sum's carry is used by the lower sum in the next cycle. Every cycle
// all four outputs are compared; this also checks the two-cycle latency of
// the slow operand line and the one-cycle latency of the others.
module tb_alg2_cell;
  import bsq_pkg::*;

  logic clk = 1'b0;
  logic rst;
  alg2_link_t lin, lout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  alg2_cell dut (.clk(clk), .rst(rst), .link_in(lin), .link_out(lout));

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t1, t2, b, pm, c, ph, pl, slo, shi, carries;

  initial begin
    rst = 1'b1; lin = '0;
    @(posedge clk); #1 rst = 1'b0;
    {t1, t2, b, pm, c, ph, pl} = '{default: 0};
    carries = 0;
    for (int t = 0; t < 2000; t++) begin
      lin = 4'($urandom);
      #2;
      checks++;
      if (lout.a_slow !== 1'(t2) || lout.a_fast !== 1'(b) || lout.p_hi !== 1'(ph) || lout.p_lo !== 1'(pl)) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: slow=%0b fast=%0b hi=%0b lo=%0b want %0d %0d %0d %0d",
                   t, lout.a_slow, lout.a_fast, lout.p_hi, lout.p_lo, t2, b, ph, pl);
      end
      slo = t2 * b + pm + c;
      shi = int'(lin.p_lo) + slo / 2;
      if (c != 0) carries++;
      @(posedge clk);
      c = shi / 2; ph = shi % 2; pl = slo % 2;
      pm = int'(lin.p_hi); t2 = t1; t1 = int'(lin.a_slow); b = int'(lin.a_fast);
      #1;
    end
    checks++;
    if (carries == 0) begin failures++; $display("stored carry never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
