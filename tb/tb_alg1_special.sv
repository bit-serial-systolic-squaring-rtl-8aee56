// tb_alg1_special: self-checking test of the algorithm I reflecting cell.
//
// Drives a random operand stream and checks every cycle that the reflected
// stream is the input delayed by three cycles, and that the two result
// lines carry the sum and carry of a_(t-1) + a_(t-1)*a_(t-3), i.e. the latched
// operand bit (its own square) plus its product with the bit three latches
// further on, worked out here with integer arithmetic.
module tb_alg1_special;
  import bsq_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic a_in;
  alg1_back_t bout;
  int checks = 0, failures = 0;
  logic hist [4000];

  always #5 clk = ~clk;

  alg1_special dut (.clk(clk), .rst(rst), .a_in(a_in), .back_out(bout));

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int h(int t);
    return (t < 0) ? 0 : int'(hist[t]);
  endfunction

  initial begin
    int s, seen_carry;
    seen_carry = 0;
    rst = 1'b1; a_in = 0;
    @(posedge clk); #1 rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      a_in = 1'($urandom);
      hist[t] = a_in;
      #2;
      // y1 = a(t-1), y3 = a(t-3); results latched one cycle after y1/y3 formed
      s = h(t - 2) + h(t - 2) * h(t - 4);
      checks++;
      if (bout.a_ref !== 1'(h(t - 3)) || bout.p_lo !== 1'(s % 2) || bout.p_hi !== 1'(s / 2)) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: a_ref=%0b hi=%0b lo=%0b want %0d %0d %0d",
                   t, bout.a_ref, bout.p_hi, bout.p_lo, h(t - 3), s / 2, s % 2);
      end
      if (s / 2 != 0) seen_carry++;
      @(posedge clk);
      #1;
    end
    checks++;
    if (seen_carry == 0) begin failures++; $display("no carry produced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
