// tb_clk_div_10: the output must have a period of exactly 10 input clocks with
// 5 high and 5 low, starting from power-up without any reset.
`timescale 1ns/1ps
module tb_clk_div_10;
  logic clk_in = 1'b0, clk_out;
  always #5 clk_in = ~clk_in;

  clk_div_10 dut (.clk_in, .clk_out);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk_in);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int hi, lo, rises;
    logic prev;
    rises = 0;
    prev = 1'b0;
    // wait for the first rising edge, which must come within one period
    for (int i = 0; i < 12 && !(clk_out && !prev); i++) begin prev = clk_out; @(posedge clk_in); #1; end
    check(clk_out == 1'b1, "output starts toggling");
    for (int p = 0; p < 200; p++) begin
      hi = 0; lo = 0;
      while (clk_out && hi < 50) begin hi++; @(posedge clk_in); #1; end
      while (!clk_out && lo < 50) begin lo++; @(posedge clk_in); #1; end
      check(hi == 5 && lo == 5, $sformatf("period %0d: high %0d low %0d", p, hi, lo));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
