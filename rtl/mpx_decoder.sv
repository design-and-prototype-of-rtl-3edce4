// mpx_decoder: FM MPX stereo demodulator (pilot, left and right channels).
//
// Data flow (Fs = 192 kHz samples, 12-bit):
//   mpx_sig -> 19 kHz BPF -> freq_doubler -> full-scale pilot, 38 kHz LO
//   mpx_sig -> 38 kHz BPF -> x LO x2 (mixer) -> 15 kHz LPF "diff" -> *0.5 = diff_x_0p5
//   mpx_sig -> 15 kHz LPF "sum"                                 -> *0.5 = sum_x_0p5
//   sum_x_0p5 -> sync delay (SYNC_DELAY Fs cycles)
//   lt_chan = sum_x_0p5 + diff_x_0p5,  rt_chan = sum_x_0p5 - diff_x_0p5
// All four FIR filters have 443 taps (order 442) so that the pilot, the 38 kHz
// band and the mono band leave their filters with the same delay; the L-R path
// has one extra filter, which the sync delay compensates (see sync_delay).
// The mixer output is doubled so that the L-R term reaches the diff filter at
// the same 0.225 scale as the L+R term (C0 = 0.225); the outputs are then
// 0.225*L and 0.225*R in Q11. pilot is the full-scale (x10) recovered pilot in
// A(1,10).
//
// Clocking. The FIRs run on clk_fir (512*Fs); everything else on clk_fs, which
// must be clk_fir divided by 512 (clk_div_512). A rising clk_fs is detected in
// the clk_fir domain and starts the filters two clk_fir cycles after the edge;
// their results (226 cycles later) are ready well before the next clk_fs edge,
// where the Fs pipeline picks them up. Pipeline on clk_fs, counting from the
// edge k at which mpx_sig shows sample x[k]:
//   k+1  stage 1: filter outputs truncated to Q11
//   k+2  stage 2: freq_doubler registers pilot*10 and its NCO (lo38 aligned);
//                 38 kHz band and sum path delayed to match
//   k+3  stage 3: mixer product registered; feeds the diff filter
//   k+4  stage 4: diff filter output (x0.5) registered; sum path (x0.5) matched
//   k+5  stage 5: sum delayed by SYNC_DELAY, then L and R registered
// rst is asynchronous, active high.
//
// The filter set, the orders, the x10 pilot, the 0.5 scalings, the sum/diff
// recombination and the 29-cycle sum delay follow the decoder design. The stage
// assignment, the x2 mixer scaling, the Q11 truncations and the start-strobe
// generation are this design's choices.
module mpx_decoder
  import mpx_pkg::*;
#(
  parameter int NTAPS       = 443,
  parameter int SYNC_DELAY  = 29,
  parameter int STROBE_WAIT = 96
) (
  input  logic    clk_fir,
  input  logic    clk_fs,
  input  logic    rst,
  input  sample_t mpx_sig,
  output sample_t pilot,
  output sample_t lt_chan,
  output sample_t rt_chan
);

  // ---------------- filter start strobe (clk_fir domain) ----------------
  logic fs_d, nd;
  always_ff @(posedge clk_fir or posedge rst) begin
    if (rst) begin
      fs_d <= 1'b0;
      nd   <= 1'b0;
    end else begin
      fs_d <= clk_fs;
      nd   <= clk_fs & ~fs_d;
    end
  end

  // ---------------- FIR filters ----------------
  localparam int OUT_W = 37;
  logic signed [OUT_W-1:0] y_bp19, y_bp38, y_lps, y_lpd;
  sample_t                 mix;

  fir_mac #(.NTAPS(NTAPS), .COEF_W(16), .COEF_FRAC(19), .FTYPE(FIR_BANDPASS),
            .FT1(0.088542), .FT2(0.109375), .OUT_W(OUT_W))
    fir_filt_bp_19k (.clk(clk_fir), .rst, .nd, .din(mpx_sig), .dout(y_bp19), .rdy(), .busy_clear());

  fir_mac #(.NTAPS(NTAPS), .COEF_W(16), .COEF_FRAC(16), .FTYPE(FIR_BANDPASS),
            .FT1(0.11979), .FT2(0.27604), .OUT_W(OUT_W))
    fir_filt_bp_38k (.clk(clk_fir), .rst, .nd, .din(mpx_sig), .dout(y_bp38), .rdy(), .busy_clear());

  fir_mac #(.NTAPS(NTAPS), .COEF_W(16), .COEF_FRAC(17), .FTYPE(FIR_LOWPASS),
            .FT1(0.078125), .FT2(0.0), .OUT_W(OUT_W))
    fir_filt_lp_15k_sum (.clk(clk_fir), .rst, .nd, .din(mpx_sig), .dout(y_lps), .rdy(), .busy_clear());

  fir_mac #(.NTAPS(NTAPS), .COEF_W(16), .COEF_FRAC(17), .FTYPE(FIR_LOWPASS),
            .FT1(0.078125), .FT2(0.0), .OUT_W(OUT_W))
    fir_filt_lp_15k_diff (.clk(clk_fir), .rst, .nd, .din(mix), .dout(y_lpd), .rdy(), .busy_clear());

  // full-precision Q(11+COEF_FRAC) -> Q11
  function automatic sample_t to_q11(input logic signed [OUT_W-1:0] y, input int coef_frac);
    return sat12(48'(y >>> coef_frac));
  endfunction

  // ---------------- Fs pipeline ----------------
  sample_t s1_bp19, s1_bp38, s1_sum;
  sample_t s2_bp38, s2_sum;
  sample_t s3_sum;
  sample_t sum_x_0p5, diff_x_0p5, sum_sync;
  sample_t pilot_fs, lo38, sine19;
  logic signed [23:0] vd_n;
  logic               pll_strobe;

  freq_doubler #(.STROBE_WAIT(STROBE_WAIT)) u_freq_doubler (
    .clk(clk_fs), .rst, .pilot_in(s1_bp19), .pilot_fs, .sine19, .lo38,
    .vd_n, .strobe(pll_strobe)
  );

  always_ff @(posedge clk_fs or posedge rst) begin
    if (rst) begin
      s1_bp19 <= '0; s1_bp38 <= '0; s1_sum <= '0;
      s2_bp38 <= '0; s2_sum <= '0;
      mix <= '0; s3_sum <= '0;
      diff_x_0p5 <= '0; sum_x_0p5 <= '0;
      lt_chan <= '0; rt_chan <= '0; pilot <= '0;
    end else begin
      // stage 1
      s1_bp19 <= to_q11(y_bp19, 19);
      s1_bp38 <= to_q11(y_bp38, 16);
      s1_sum  <= to_q11(y_lps, 17);
      // stage 2 (freq_doubler registers pilot_fs and lo38 on this edge)
      s2_bp38 <= s1_bp38;
      s2_sum  <= s1_sum;
      // stage 3: mixer, Q11 * A(1,10) = Q21; x2 -> Q11 is >>> 9
      mix     <= sat12((48'(s2_bp38) * 48'(lo38)) >>> 9);
      s3_sum  <= s2_sum;
      // stage 4
      diff_x_0p5 <= sample_t'(to_q11(y_lpd, 17) >>> 1);
      sum_x_0p5  <= sample_t'(s3_sum >>> 1);
      // stage 5
      lt_chan <= sat12(48'(sum_sync) + 48'(diff_x_0p5));
      rt_chan <= sat12(48'(sum_sync) - 48'(diff_x_0p5));
      pilot   <= pilot_fs;
    end
  end

  sync_delay #(.DELAY(SYNC_DELAY)) sync_sum_x_0p5 (
    .clk(clk_fs), .rst, .din(sum_x_0p5), .dout(sum_sync)
  );

endmodule
