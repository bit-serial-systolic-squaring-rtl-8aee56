// tb_alg2_special: self-checking test of the algorithm II copying cell.
//
// Drives a random operand stream and checks every cycle that both operand
// lines and the upper result line carry the input of the previous cycle
// (a bit is its own square) and that the lower result line is zero.
module tb_alg2_special;
  import bsq_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic a_in, prev;
  alg2_link_t lout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  alg2_special dut (.clk(clk), .rst(rst), .a_in(a_in), .link_out(lout));

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; a_in = 0; prev = 0;
    @(posedge clk); #1 rst = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      a_in = 1'($urandom);
      #2;
      checks++;
      if (lout !== alg2_link_t'({prev, prev, 1'b0, prev})) begin
        failures++;
        if (failures < 10) $display("cycle %0d: got %b want a=%0b", t, lout, prev);
      end
      @(posedge clk);
      prev = a_in;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
