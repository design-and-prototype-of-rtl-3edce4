// tb_sync_delay: random samples go into the sum-path delay line; every output
// must equal the input of exactly DELAY clocks earlier, once DELAY samples have
// entered (the line's contents are not cleared by reset). Instances with the default delay of 29, with 221
// and with 1 are checked.
`timescale 1ns/1ps
module tb_sync_delay;
  import mpx_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  sample_t din = '0, d29, d221, d1;
  always #5 clk = ~clk;

  sync_delay                u29  (.clk, .rst, .din, .dout(d29));
  sync_delay #(.DELAY(221)) u221 (.clk, .rst, .din, .dout(d221));
  sync_delay #(.DELAY(1))   u1   (.clk, .rst, .din, .dout(d1));

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    sample_t hist [$];
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 1500; n++) begin
      sample_t v;
      v = sample_t'($urandom);
      din = v;
      hist.push_front(v);
      @(posedge clk);
      #1;
      check(d1 == hist[0], $sformatf("n %0d delay 1", n));
      if (n >= 28)  check(d29 == hist[28], $sformatf("n %0d delay 29: %0d", n, d29));
      if (n >= 220) check(d221 == hist[220], $sformatf("n %0d delay 221", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
