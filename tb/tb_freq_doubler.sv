// tb_freq_doubler: checks the ADPLL frequency doubler.
// Stimulus: a Q11 19 kHz pilot of amplitude 0.1 (as it leaves the 19 kHz
// band-pass filter) with phase offset theta; theta jumps by +60 and then -100
// degrees during the run. After each jump the loop must re-lock: the mean of
// vd_n over the last 500 us of each segment must be within 0.03 and the 38 kHz
// LO must equal cos(2*phi) where the full-scale pilot is cos(phi), i.e.
// lo38 ~= 2*pilot_fs^2 - 1 (rms error below 0.1). Also checked: the pilot gain
// of 10, and that the strobe fires exactly every 96 samples.
`timescale 1ns/1ps
module tb_freq_doubler;
  import mpx_pkg::*;
  localparam real TW_PI = 3.141592653589793;
  logic clk = 1'b0, rst = 1'b1;
  sample_t pilot_in = '0, pilot_fs, sine19, lo38;
  logic signed [23:0] vd_n;
  logic strobe;
  always #5 clk = ~clk;

  freq_doubler dut (.clk, .rst, .pilot_in, .pilot_fs, .sine19, .lo38, .vd_n, .strobe);

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
    real theta, vd_acc, lo_err;
    int n, last_strobe, strobes, bad_gap;
    real thetas [3] = '{0.0, 60.0, -40.0};
    n = 0; last_strobe = -1; strobes = 0; bad_gap = 0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    foreach (thetas[seg]) begin
      theta = thetas[seg] * TW_PI / 180.0;
      vd_acc = 0.0; lo_err = 0.0;
      for (int k = 0; k < 1920; k++) begin
        real w;
        w = 2.0 * TW_PI * 19000.0 * real'(n) / 192000.0 + theta;
        pilot_in <= sample_t'($rtoi($floor(204.8 * $cos(w) + 0.5)));
        @(posedge clk);
        #1;
        n++;
        if (strobe) begin
          if (last_strobe >= 0 && n - last_strobe != 96) bad_gap++;
          last_strobe = n; strobes++;
        end
        if (k >= 1824) begin
          real pf, lo;
          pf = real'(pilot_fs) / 1024.0;
          lo = real'(lo38) / 1024.0;
          vd_acc += real'(vd_n) / 1048576.0;
          lo_err += (lo - (2.0 * pf * pf - 1.0)) ** 2;
        end
      end
      vd_acc /= 96.0; lo_err = $sqrt(lo_err / 96.0);
      $display("theta %0.0f: mean vd_n %.4f, LO rms error %.4f", thetas[seg], vd_acc, lo_err);
      check(vd_acc < 0.03 && vd_acc > -0.03, $sformatf("locked after step to %0.0f", thetas[seg]));
      check(lo_err < 0.1, $sformatf("LO phase after step to %0.0f", thetas[seg]));
    end
    check(bad_gap == 0 && strobes >= 55, $sformatf("strobe spacing (%0d strobes, %0d bad)", strobes, bad_gap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pilot gain: pilot_fs follows 5 x the previous Q11 pilot sample (x10 in
  // A(1,10) terms), saturated to 12 bits
  sample_t pilot_in_d;
  always @(posedge clk) begin
    pilot_in_d <= pilot_in;
    if (!rst) begin
      checks++;
      #1;
      if (pilot_fs != sat12(48'(pilot_in_d) * 5)) begin
        failures++;
        if (failures < 10) $display("FAIL: pilot gain %0d from %0d", pilot_fs, pilot_in_d);
      end
    end
  end
endmodule
