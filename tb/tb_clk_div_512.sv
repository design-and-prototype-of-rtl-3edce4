// tb_clk_div_512: after reset the output must be low, then toggle with a
// period of exactly 512 input clocks and a 50 % duty cycle; reset in the
// middle of a period must restart it.
`timescale 1ns/1ps
module tb_clk_div_512;
  logic clk_in = 1'b0, rst = 1'b1, clk_out;
  always #5 clk_in = ~clk_in;

  clk_div_512 dut (.clk_in, .rst, .clk_out);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk_in);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(int periods);
    int hi, lo;
    logic prev;
    // align to a rising edge of the output
    prev = clk_out;
    while (!(clk_out && !prev)) begin prev = clk_out; @(posedge clk_in); #1; end
    for (int p = 0; p < periods; p++) begin
      hi = 0; lo = 0;
      while (clk_out) begin hi++; @(posedge clk_in); #1; end
      while (!clk_out) begin lo++; @(posedge clk_in); #1; end
      check(hi == 256 && lo == 256, $sformatf("period %0d: high %0d low %0d", p, hi, lo));
    end
  endtask

  initial begin : main
    repeat (3) @(posedge clk_in);
    #1;
    check(clk_out == 1'b0, "low in reset");
    rst = 1'b0;
    begin
      int first_rise;
      first_rise = 0;
      while (!clk_out) begin first_rise++; @(posedge clk_in); #1; end
      check(first_rise == 256, $sformatf("first rise after %0d clocks", first_rise));
    end
    measure(20);
    repeat (100) @(posedge clk_in);
    #1 rst = 1'b1;
    #1 check(clk_out == 1'b0, "asynchronous reset");
    @(posedge clk_in);
    #1 rst = 1'b0;
    measure(10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
