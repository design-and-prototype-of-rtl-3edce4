// tb_mpx_encoder: the table-driven MPX source must reproduce, within one LSB
// of Q11, the stereo multiplex equation evaluated here in floating point:
// 0.225*(L+R) + 0.225*(L-R)*cos(4*pi*19k*t) + 0.1*cos(2*pi*19k*t) with
// L = sin(2*pi*5k*t), R = sin(2*pi*7k*t), t = n/192 kHz; the output must repeat
// every 192 samples, and must be held at zero by reset and restart from
// sample 0 afterwards.
`timescale 1ns/1ps
module tb_mpx_encoder;
  import mpx_pkg::*;
  localparam real TW_PI = 3.141592653589793;
  logic clk_fs = 1'b0, rst = 1'b1;
  sample_t mpx_out;
  always #5 clk_fs = ~clk_fs;

  mpx_encoder dut (.clk_fs, .rst, .mpx_out);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk_fs);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int count);
    for (int n = 0; n < count; n++) begin
      real t, l, r, s, d;
      @(posedge clk_fs);
      #1;
      t = real'(n % 192) / 192000.0;
      l = $sin(2.0 * TW_PI * 5000.0 * t);
      r = $sin(2.0 * TW_PI * 7000.0 * t);
      s = 0.225 * (l + r) + 0.225 * (l - r) * $cos(2.0 * TW_PI * 38000.0 * t)
          + 0.1 * $cos(2.0 * TW_PI * 19000.0 * t);
      d = real'(mpx_out) - s * 2048.0;
      check(d <= 1.0 && d >= -1.0, $sformatf("n %0d: %0d vs %f", n, mpx_out, s * 2048.0));
    end
  endtask

  initial begin : main
    repeat (3) @(posedge clk_fs);
    #1;
    check(mpx_out == 0, "reset value");
    rst = 1'b0;
    run(500);
    #1 rst = 1'b1;
    @(posedge clk_fs);
    #1 rst = 1'b0;
    run(400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
