// tb_loop_filter: checks the ADPLL loop filter.
//  1. Bit-exact: random phase-error words against the integer recurrence
//     vd[n] = floor((2382*(pe[n]+pe[n-1]) + 60772*vd[n-1]) / 2^16).
//  2. Behaviour: the phase-detector product of a unit 19 kHz cosine and a unit
//     sine offset by theta is filtered; the mean output must equal
//     -0.5*sin(theta) within 0.01 for theta = -90..90 degrees, and the output
//     must settle within about 250 us (48 samples) to within 0.05. The means
//     are also held against the published simulation of this filter
//     (0.500005, 0.432964, 0.353482, 0.249910, 0, -0.250095, -0.353632,
//     -0.433070, -0.500005), within 0.002.
`timescale 1ns/1ps
module tb_loop_filter;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [23:0] pe = '0, vd;
  always #5 clk = ~clk;

  loop_filter dut (.clk, .rst, .pe, .vd);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    longint m_vd, m_pe_d, num;
    int thetas [9] = '{-90, -60, -45, -30, 0, 30, 45, 60, 90};
    real published [9] = '{0.500005, 0.432964, 0.353482, 0.249910, 0.0,
                           -0.250095, -0.353632, -0.433070, -0.500005};
    m_vd = 0; m_pe_d = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    // 1. bit-exact against the recurrence
    for (int n = 0; n < 2000; n++) begin
      longint p;
      p = longint'($urandom_range(2097152)) - 1048576;
      pe <= 24'(p);
      @(posedge clk);
      #1;
      num = 2382 * (p + m_pe_d) + 60772 * m_vd;
      m_vd = num >>> 16;
      m_pe_d = p;
      check(longint'(vd) == m_vd, $sformatf("step %0d: vd %0d want %0d", n, vd, m_vd));
    end
    // 2. DC response of the phase detector product
    foreach (thetas[t]) begin
      real acc, want, th, got;
      int settle_at;
      th = real'(thetas[t]) * 3.141592653589793 / 180.0;
      want = -0.5 * $sin(th);
      acc = 0.0; settle_at = -1;
      for (int n = 0; n < 480; n++) begin
        real u1, u2, w;
        w = 2.0 * 3.141592653589793 * 19000.0 * real'(n) / 192000.0;
        u1 = $floor(1024.0 * $cos(w + th) + 0.5);
        u2 = $floor(1024.0 * $sin(w) + 0.5);
        pe <= 24'($rtoi(u1 * u2));
        @(posedge clk);
        #1;
        got = real'(vd) / 1048576.0;
        if (n >= 96) acc += got;
        if (settle_at < 0 && (got - want < 0.05) && (want - got < 0.05) && n > 0) settle_at = n;
      end
      acc = acc / 384.0;
      $display("theta %0d: vd mean %f expected %f (within 0.05 after %0d samples)", thetas[t], acc, want, settle_at);
      check(acc - want < 0.01 && want - acc < 0.01, $sformatf("theta %0d mean vd", thetas[t]));
      check(acc - published[t] < 0.002 && published[t] - acc < 0.002,
            $sformatf("theta %0d mean vd against published value", thetas[t]));
      check(settle_at > 0 && settle_at <= 48, $sformatf("theta %0d settling within 250 us", thetas[t]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
