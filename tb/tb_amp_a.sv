// tb_amp_a: checks the vd_n -> phase tuning word conversion of amplifier A
// against the three equations evaluated in floating point:
// theta_diff = -120*vd, theta_offset = theta_diff (+360 if vd >= 0),
// tuning word = 46603*theta_offset mod 2^24 (allowing one count of truncation).
`timescale 1ns/1ps
module tb_amp_a;
  logic signed [23:0] vd_n;
  logic signed [39:0] theta_offset_q;
  logic [23:0]        tuning_word;

  amp_a dut (.vd_n, .theta_offset_q, .tuning_word);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int v);
    real vd, th, off, tw, tw_mod;
    longint got, want, diff;
    vd_n = 24'(v);
    #1;
    vd = real'(v) / 1048576.0;
    th = -120.0 * vd;
    off = (vd < 0.0) ? th : th + 360.0;
    tw = 46603.0 * off;
    want = longint'($floor(tw));
    want = want % 16777216;
    if (want < 0) want += 16777216;
    got = longint'(tuning_word);
    diff = got - want;
    if (diff > 8388608) diff -= 16777216;
    if (diff < -8388608) diff += 16777216;
    check(diff >= -1 && diff <= 1, $sformatf("vd %f: tuning word %0d want %0d", vd, got, want));
    check(theta_offset_q >= 0, $sformatf("vd %f: theta_offset negative", vd));
  endtask

  initial begin : main
    // the points of the linear fit and the table values
    one(0);
    one(-262144);      // -0.25 -> +30 degrees
    one(262144);       // +0.25 -> -30 degrees -> 330
    one(524288);       // +0.5  -> -60 -> 300
    one(-524288);
    one(1);
    one(-1);
    for (int i = 0; i < 2000; i++) one(int'($urandom_range(1572864)) - 786432);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
