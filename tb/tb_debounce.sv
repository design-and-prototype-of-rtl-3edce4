// tb_debounce: the input is driven between clock edges (asynchronous to the
// sampling clock). Pulses of 1 or 2 clocks in either direction must not reach
// the output; a level held for at least SAMPLES (3) clocks must appear at the
// output no later than 2 + SAMPLES + 1 clocks after it started, and a bouncing
// press (several short pulses followed by a steady level) must give exactly one
// output edge.
`timescale 1ns/1ps
module tb_debounce;
  logic clk = 1'b0, sig_in = 1'b0, sig_out;
  always #5 clk = ~clk;

  debounce dut (.clk, .sig_in, .sig_out);

  int checks = 0, failures = 0, out_edges = 0;
  logic out_d = 1'b0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin out_d <= sig_out; if (sig_out != out_d) out_edges++; end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive `level` for `n` clocks starting 3 ns after an edge, then back
  task automatic pulse(logic level, int n);
    @(posedge clk); #3 sig_in = level;
    repeat (n) @(posedge clk);
    #3 sig_in = ~level;
  endtask

  task automatic hold(logic level, int n, output int delay);
    @(posedge clk); #3 sig_in = level;
    delay = -1;
    for (int i = 1; i <= n; i++) begin
      @(posedge clk); #1;
      if (delay < 0 && sig_out == level) delay = i;
    end
  endtask

  initial begin : main
    int d;
    repeat (10) @(posedge clk);
    check(sig_out == 1'b0, "idle low");
    for (int w = 1; w <= 2; w++) begin
      pulse(1'b1, w);
      repeat (8) @(posedge clk);
      check(sig_out == 1'b0, $sformatf("%0d-clock high glitch rejected", w));
    end
    hold(1'b1, 20, d);
    check(d > 0 && d <= 6, $sformatf("steady high passes after %0d clocks", d));
    for (int w = 1; w <= 2; w++) begin
      pulse(1'b0, w);
      repeat (8) @(posedge clk);
      check(sig_out == 1'b1, $sformatf("%0d-clock low glitch rejected", w));
    end
    hold(1'b0, 20, d);
    check(d > 0 && d <= 6, $sformatf("steady low passes after %0d clocks", d));
    // bouncing press
    out_edges = 0;
    repeat (4) begin pulse(1'b1, 2); pulse(1'b0, 1); sig_in = 1'b0; end
    hold(1'b1, 20, d);
    check(sig_out == 1'b1, "bouncing press ends high");
    repeat (3) @(posedge clk);
    check(out_edges == 1, $sformatf("one output edge for a bouncing press (%0d)", out_edges));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
