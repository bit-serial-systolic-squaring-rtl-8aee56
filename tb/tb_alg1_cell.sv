// tb_alg1_cell: self-checking test of the algorithm I internal cell.
//
// Drives random bits on all inputs for many cycles and keeps a reference of
// the cell's eight state bits, updated with integer arithmetic: the lower
// result bit is (u3*r + p_lo_in + c2) mod 2, the upper one
// (u1*r + p_hi_in + carry of the lower sum) mod 2, and the upper carry
// reaches the lower sum two cycles later. Every cycle all four outputs
// are compared with the reference; the one-cycle latency of the result and
// forward lines and the three-cycle latency of the reflected line are checked
// by the same comparison.
module tb_alg1_cell;
  import bsq_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic a_in, a_out;
  alg1_back_t bin, bout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  alg1_cell dut (.clk(clk), .rst(rst), .a_in(a_in), .a_out(a_out), .back_in(bin), .back_out(bout));

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  int r, u1, u2, u3, c1, c2, ph, pl;
  int slo, shi;
  int carries = 0;

  initial begin
    rst = 1'b1; a_in = 0; bin = '0;
    @(posedge clk); #1 rst = 1'b0;
    {r, u1, u2, u3, c1, c2, ph, pl} = '{default: 0};
    for (int t = 0; t < 2000; t++) begin
      a_in = 1'($urandom); bin = 3'($urandom);
      #2;
      checks++;
      if (a_out !== 1'(r) || bout.a_ref !== 1'(u3) || bout.p_hi !== 1'(ph) || bout.p_lo !== 1'(pl)) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: out a=%0b a_ref=%0b hi=%0b lo=%0b, want %0d %0d %0d %0d",
                   t, a_out, bout.a_ref, bout.p_hi, bout.p_lo, r, u3, ph, pl);
      end
      slo = (u3 * r) + int'(bin.p_lo) + c2;
      shi = (u1 * r) + int'(bin.p_hi) + slo / 2;
      if (c2 != 0) carries++;
      @(posedge clk);
      c2 = c1; c1 = shi / 2; ph = shi % 2; pl = slo % 2;
      u3 = u2; u2 = u1; u1 = int'(bin.a_ref); r = int'(a_in);
      #1;
    end
    checks++;
    if (carries == 0) begin failures++; $display("stored carry never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
