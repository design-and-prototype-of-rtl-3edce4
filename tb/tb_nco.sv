// tb_nco: checks the frequency doubler's NCO.
// A reference phase accumulator in the testbench tracks ftw + ptw; the sine
// output must equal round(1024*sin(2*pi*a/4096)) and the doubled-phase cosine
// round(1024*cos(2*pi*2a/4096)) for the truncated 12-bit phase a, every cycle.
// With the 19 kHz tuning word, 192 samples must contain 19 sine periods and 38
// cosine periods (zero crossings), and a one-cycle phase tuning word must
// shift the phase permanently.
`timescale 1ns/1ps
module tb_nco;
  import mpx_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic [23:0] ftw = 24'd1660245, ptw = '0, phase;
  sample_t sine, cos2x;
  always #5 clk = ~clk;

  nco dut (.clk, .rst, .ftw, .ptw, .phase, .sine, .cos2x);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    longint ref_ph;
    int zc_s, zc_c;
    sample_t prev_s, prev_c;
    ref_ph = 0;
    repeat (2) @(posedge clk);
    #1;
    check(sine == 0 && cos2x == 1024, "reset values");
    rst = 1'b0;
    zc_s = 0; zc_c = 0; prev_s = sine; prev_c = cos2x;
    for (int n = 0; n < 3000; n++) begin
      int a;
      real ws, wc;
      if (n == 1500) ptw = 24'd4194304;     // +90 degrees for one cycle
      else if (n == 1501) ptw = 24'd0;
      else if (n == 2000) ftw = 24'd3320490; // 38 kHz
      @(posedge clk);
      #1;
      ref_ph = (ref_ph + longint'(ftw) + longint'(ptw)) % 16777216;
      a = int'(ref_ph >> 12);
      ws = $floor(1024.0 * $sin(2.0 * 3.141592653589793 * real'(a) / 4096.0) + 0.5);
      wc = $floor(1024.0 * $cos(2.0 * 3.141592653589793 * real'((2 * a) % 4096) / 4096.0) + 0.5);
      check(longint'(phase) == ref_ph, $sformatf("n %0d phase %0d want %0d", n, phase, ref_ph));
      check(real'(sine) == ws, $sformatf("n %0d sine %0d want %0f", n, sine, ws));
      check(real'(cos2x) == wc, $sformatf("n %0d cos2x %0d want %0f", n, cos2x, wc));
      if (n < 192) begin
        if ((prev_s < 0) != (sine < 0)) zc_s++;
        if ((prev_c < 0) != (cos2x < 0)) zc_c++;
      end
      prev_s = sine; prev_c = cos2x;
    end
    $display("zero crossings in 1 ms: sine %0d cos2x %0d", zc_s, zc_c);
    check(zc_s >= 37 && zc_s <= 39, "19 kHz sine frequency");
    check(zc_c >= 75 && zc_c <= 77, "38 kHz cosine frequency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
