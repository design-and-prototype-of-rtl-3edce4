// tb_mpx_decoder: checks the MPX decoder on its own.
// Stimulus: the stereo test signal of the encoder equation computed here in
// floating point and quantised to Q11 (0.225*(L+R) + 0.225*(L-R)*cos(2w) +
// 0.1*cos(w), w = 19 kHz, L = 5 kHz sine, R = 7 kHz sine), one sample per Fs
// period; the filter clock is 512 times Fs.
// Two decoders run side by side: one with the default sum-path delay of 29
// samples and one with 221 samples (the true filter-latency difference).
// Because the stimulus repeats every 192 samples both must separate the
// channels. Checks, after settling: left = 5 kHz at 461 LSB with little 7 kHz,
// right the reverse, pilot is a full-scale 19 kHz tone, and the pilot output
// of both decoders is identical.
`timescale 1ns/1ps
module tb_mpx_decoder;
  import mpx_pkg::*;
  localparam int NSAMP = 2200, SETTLE = 1700;
  localparam real TW_PI = 3.141592653589793;

  logic clk_fir = 1'b0, clk_fs = 1'b0, rst = 1'b1;
  sample_t mpx_sig = '0;
  sample_t pilot, lt_chan, rt_chan, pilot_b, lt_b, rt_b;
  int div = 0, nfs = 0;

  always #5 clk_fir = ~clk_fir;
  always @(posedge clk_fir) begin
    div <= (div + 1) % 512;
    clk_fs <= ((div + 1) % 512) >= 256;
  end

  mpx_decoder dut (.clk_fir, .clk_fs, .rst, .mpx_sig, .pilot, .lt_chan, .rt_chan);
  mpx_decoder #(.SYNC_DELAY(221)) dut_221 (.clk_fir, .clk_fs, .rst, .mpx_sig,
                                           .pilot(pilot_b), .lt_chan(lt_b), .rt_chan(rt_b));

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #(64'd10 * 512 * (NSAMP + 100));
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real acc[2][5][2];   // decoder, (L5, L7, R5, R7, P19), (I, Q)
  int  nmeas = 0, pilot_mismatch = 0;

  always @(posedge clk_fs) begin
    real t, l, r, s;
    nfs <= nfs + 1;
    t = real'(nfs) / 192000.0;
    l = $sin(2.0 * TW_PI * 5000.0 * t);
    r = $sin(2.0 * TW_PI * 7000.0 * t);
    s = 0.225 * (l + r) + 0.225 * (l - r) * $cos(2.0 * TW_PI * 38000.0 * t)
        + 0.1 * $cos(2.0 * TW_PI * 19000.0 * t);
    mpx_sig <= sample_t'($rtoi($floor(s * 2048.0 + 0.5)));
    if (nfs > SETTLE && nfs <= SETTLE + 384) begin
      real fr [5];
      real v [2][5];
      fr = '{5000.0, 7000.0, 5000.0, 7000.0, 19000.0};
      v[0] = '{real'(lt_chan), real'(lt_chan), real'(rt_chan), real'(rt_chan), real'(pilot)};
      v[1] = '{real'(lt_b), real'(lt_b), real'(rt_b), real'(rt_b), real'(pilot_b)};
      for (int d = 0; d < 2; d++)
        for (int k = 0; k < 5; k++) begin
          acc[d][k][0] += v[d][k] * $cos(2.0 * TW_PI * fr[k] * t);
          acc[d][k][1] += v[d][k] * $sin(2.0 * TW_PI * fr[k] * t);
        end
      if (pilot != pilot_b) pilot_mismatch++;
      nmeas++;
    end
  end

  initial begin : main
    foreach (acc[d, k, q]) acc[d][k][q] = 0.0;
    repeat (20) @(posedge clk_fir);
    rst = 1'b0;
    wait (nfs == NSAMP);
    for (int d = 0; d < 2; d++) begin
      real a [5];
      for (int k = 0; k < 5; k++)
        a[k] = 2.0 * $sqrt(acc[d][k][0] ** 2 + acc[d][k][1] ** 2) / nmeas;
      $display("delay %0d: left 5k %.1f 7k %.1f | right 5k %.1f 7k %.1f | pilot %.1f",
               d ? 221 : 29, a[0], a[1], a[2], a[3], a[4]);
      check(a[0] > 0.9 * 461 && a[0] < 1.1 * 461, "left 5 kHz amplitude");
      check(a[1] < 0.05 * 461, "left free of 7 kHz");
      check(a[3] > 0.9 * 461 && a[3] < 1.1 * 461, "right 7 kHz amplitude");
      check(a[2] < 0.05 * 461, "right free of 5 kHz");
      check(a[4] > 0.9 * 1024 && a[4] < 1.1 * 1024, "pilot amplitude");
    end
    check(pilot_mismatch == 0, "pilot independent of sum-path delay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
