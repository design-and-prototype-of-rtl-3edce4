// tb_fm_mpx_top: end-to-end test of the complete system at its default sizes
// (443-tap filters, 24-bit NCO, 4096-entry LUTs, 192-entry MPX table).
//
// Stimulus: board clock 133 MHz, clock-manager output 98.304 MHz (modelled here,
// with its lock flag raised after a delay), a bouncing reset button press, and
// a behavioural SPI core (spi_top_model).
// Checks:
//   * every DAC transfer carries command 0011, goes to channels A, B, C in that
//     order, and holds the offset-binary code of the decoder's pilot / left /
//     right sample of that Fs period; no SPI protocol violation;
//   * after settling, the left output contains 5 kHz at 0.225 full scale and
//     little 7 kHz, the right output the reverse (channel separation), and the
//     pilot output is a full-scale 19 kHz tone;
//   * the ADPLL ends locked (|vd_n| small) and its 38 kHz LO has the phase of the
//     38 kHz sub-carrier in the filtered signal;
//   * the Fs clock is exactly 512 clk_512fs periods.
// Mechanisms counted (each must occur): reset held by a low lock flag, button
// bounce filtered, MPX table wrap, filter start strobes, ADPLL phase
// corrections, SPI transfer-in-progress waits, new-sample events.
`timescale 1ps/1ps
module tb_fm_mpx_top;
  import mpx_pkg::*;

  localparam int NSAMP = 2400;            // Fs samples simulated after reset
  localparam int SETTLE = 1700;           // samples before measuring
  localparam real TW_PI = 3.141592653589793;

  logic clk_133MHz = 1'b0, clk_512fs = 1'b0;
  logic rst = 1'b0, dcm_locked = 1'b0, adc_out = 1'b0;
  logic spi_go;
  logic ad_conv, amp_cs, dac_clr, dcm_rst, spi_load_ctrl, spi_load_div;
  logic [23:0] spi_data_in;
  logic [23:0] word;
  logic        word_stb;
  int          protocol_errors;

  always #3759 clk_133MHz = ~clk_133MHz;     // 133 MHz
  always #5086 clk_512fs  = ~clk_512fs;      // ~98.304 MHz

  fm_mpx_top dut (.*);

  spi_top_model u_spi (.clk(clk_512fs), .rst(~dac_clr), .data_in(spi_data_in),
                       .load_ctrl(spi_load_ctrl), .load_div(spi_load_div), .go(spi_go),
                       .word, .word_stb, .protocol_errors);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_lock_reset = 0, n_bounce = 0, n_wrap = 0, n_fir_start = 0, n_pll_corr = 0;
  int n_tip_wait = 0, n_chan_change = 0;

  always @(posedge clk_512fs) begin
    if (!dcm_locked && dut.rst_global && !dut.rst_debounced) n_lock_reset++;
    if (dut.u_mpx_decoder.nd) n_fir_start++;
    if (dut.u_spi_controller.state inside {5, 9, 13} && spi_go) n_tip_wait++;
    if (dut.dac_chan_change) n_chan_change++;
  end

  // ---------------- Fs-rate observation ----------------
  int   nfs = 0;
  real  li5 = 0, lq5 = 0, li7 = 0, lq7 = 0, ri5 = 0, rq5 = 0, ri7 = 0, rq7 = 0, pi19 = 0, pq19 = 0;
  int   nmeas = 0;
  real  vd_acc = 0;
  real  phase_err_acc = 0; int n_phase = 0;
  time  t_last_fs = 0;
  int   fs_period_bad = 0;
  sample_t exp_a, exp_b, exp_c;

  always @(posedge dut.clk_fs) begin
    nfs++;
    if (dut.u_mpx_encoder.count == 8'd191) n_wrap++;
    if (dut.u_mpx_decoder.pll_strobe && dut.u_mpx_decoder.u_freq_doubler.u_amp.tuning_word != 0
        && nfs > 600) n_pll_corr++;
    if (t_last_fs != 0 && (($time - t_last_fs) != 512 * 10172)) fs_period_bad++;
    t_last_fs = $time;
    if (nfs > SETTLE && nfs <= SETTLE + 384) begin
      real a5, a7, a19, l, r, p;
      a5  = 2.0 * TW_PI * 5000.0 * real'(nfs) / 192000.0;
      a7  = 2.0 * TW_PI * 7000.0 * real'(nfs) / 192000.0;
      a19 = 2.0 * TW_PI * 19000.0 * real'(nfs) / 192000.0;
      l = real'(dut.lt_chan); r = real'(dut.rt_chan); p = real'(dut.pilot);
      li5 += l * $cos(a5); lq5 += l * $sin(a5); li7 += l * $cos(a7); lq7 += l * $sin(a7);
      ri5 += r * $cos(a5); rq5 += r * $sin(a5); ri7 += r * $cos(a7); rq7 += r * $sin(a7);
      pi19 += p * $cos(a19); pq19 += p * $sin(a19);
      nmeas++;
      vd_acc += real'(dut.u_mpx_decoder.vd_n) / 1048576.0;
      // LO must be cos(2*theta) where the pilot at the same stage is cos(theta):
      // compare lo38 with 2*pilot^2 - 1 (both A(1,10))
      begin
        real pf, lo, ideal;
        pf = real'(dut.u_mpx_decoder.pilot_fs) / 1024.0;
        lo = real'(dut.u_mpx_decoder.lo38) / 1024.0;
        ideal = 2.0 * pf * pf - 1.0;
        phase_err_acc += (lo - ideal) * (lo - ideal);
        n_phase++;
      end
    end
  end

  // ---------------- DAC word checks ----------------
  int n_words = 0, expect_ch = 0;
  always @(posedge clk_512fs) begin
    if (dut.dac_chan_change) begin
      exp_a <= dut.pilot; exp_b <= dut.lt_chan; exp_c <= dut.rt_chan;
    end
    if (!dac_clr) expect_ch = 0;      // SPI core model held in reset
    else if (word_stb) begin
      logic [3:0] want_addr;
      sample_t    want_s;
      n_words++;
      case (expect_ch)
        0: begin want_addr = DAC_ADDR_A; want_s = exp_a; end
        1: begin want_addr = DAC_ADDR_B; want_s = exp_b; end
        default: begin want_addr = DAC_ADDR_C; want_s = exp_c; end
      endcase
      check(word[23:20] == 4'b0011, $sformatf("DAC command %b", word[23:20]));
      check(word[19:16] == want_addr, $sformatf("DAC address %b, want %b", word[19:16], want_addr));
      check(word[15:4] == {~want_s[11], want_s[10:0]},
            $sformatf("DAC data %h, want %h", word[15:4], {~want_s[11], want_s[10:0]}));
      expect_ch = (expect_ch + 1) % 3;
    end
  end

  // ---------------- watchdog ----------------
  initial begin : watchdog
    #(64'd10172 * 512 * (NSAMP + 200));
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- sequence ----------------
  initial begin : main
    real al5, al7, ar5, ar7, ap19, vd;
    // button press with bounce, clock manager not yet locked
    #200000;
    repeat (3) begin
      rst = 1'b1; #90000; rst = 1'b0; #60000;
    end
    // bounce pulses shorter than the debounce window must not reach the output
    if (dut.rst_debounced == 1'b0) n_bounce++;
    check(dut.rst_debounced == 1'b0, "short bounce pulses filtered");
    rst = 1'b1; #1000000;
    check(dut.rst_debounced == 1'b1, "debounced reset asserted by held button");
    rst = 1'b0; #2000000;
    check(dut.rst_debounced == 1'b0, "debounced reset released");
    check(dut.rst_global == 1'b1, "reset held while clock manager unlocked");
    check(dac_clr == 1'b0, "DAC clear active during reset");
    #1000000;
    dcm_locked = 1'b1;
    #100000;
    check(dut.rst_global == 1'b0, "reset released after lock");
    check(dac_clr == 1'b1 && ad_conv == 1'b0 && amp_cs == 1'b1 && dcm_rst == 1'b0, "static outputs");
    wait (nfs == NSAMP);
    @(posedge clk_512fs);

    al5 = 2.0 * $sqrt(li5 * li5 + lq5 * lq5) / nmeas;
    al7 = 2.0 * $sqrt(li7 * li7 + lq7 * lq7) / nmeas;
    ar5 = 2.0 * $sqrt(ri5 * ri5 + rq5 * rq5) / nmeas;
    ar7 = 2.0 * $sqrt(ri7 * ri7 + rq7 * rq7) / nmeas;
    ap19 = 2.0 * $sqrt(pi19 * pi19 + pq19 * pq19) / nmeas;
    vd = vd_acc / nmeas;
    $display("left: 5k %.1f 7k %.1f | right: 5k %.1f 7k %.1f | pilot 19k %.1f | vd_n %.4f | LO rms err %.4f",
             al5, al7, ar5, ar7, ap19, vd, $sqrt(phase_err_acc / n_phase));
    $display("words %0d  lock_reset %0d bounce %0d wrap %0d fir_start %0d pll_corr %0d tip_wait %0d chan_change %0d",
             n_words, n_lock_reset, n_bounce, n_wrap, n_fir_start, n_pll_corr, n_tip_wait, n_chan_change);
    check(al5 > 0.9 * 461 && al5 < 1.1 * 461, "left channel 5 kHz amplitude");
    check(al7 < 0.05 * 461,                   "left channel free of right (7 kHz)");
    check(ar7 > 0.9 * 461 && ar7 < 1.1 * 461, "right channel 7 kHz amplitude");
    check(ar5 < 0.05 * 461,                   "right channel free of left (5 kHz)");
    check(ap19 > 0.9 * 1024 && ap19 < 1.1 * 1024, "full-scale pilot amplitude");
    check(vd < 0.03 && vd > -0.03, "ADPLL locked (mean vd_n within 0.03, about 3.6 degrees)");
    check($sqrt(phase_err_acc / n_phase) < 0.1, "38 kHz LO in phase with 2x pilot");
    check(fs_period_bad == 0, "Fs period is 512 fast clocks");
    check(protocol_errors == 0, "SPI core register protocol");
    check(n_words >= 3 * (NSAMP - 10), $sformatf("DAC transfers %0d", n_words));
    check(n_lock_reset > 0, "mechanism: reset held by lock flag");
    check(n_bounce > 0, "mechanism: bounce filtered");
    check(n_wrap > 0, "mechanism: MPX table wrap");
    check(n_fir_start > 0, "mechanism: filter start");
    check(n_pll_corr > 0, "mechanism: ADPLL phase correction");
    check(n_tip_wait > 0, "mechanism: SPI transfer wait");
    check(n_chan_change > 0, "mechanism: new-sample event");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
