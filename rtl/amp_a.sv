// amp_a: amplifier "A" of the frequency doubler; turns the loop-filter output
// vd_n into the NCO phase tuning word.
//
// Three steps, all combinational:
//   theta_diff   = -120 * vd_n                 (degrees; linear fit of
//                                                vd_n = -0.5*sin(theta) through
//                                                (0,0) and (-0.25, 30 deg))
//   theta_offset = theta_diff          if vd_n <  0
//                  theta_diff + 360    if vd_n >= 0   (always non-negative)
//   tuning_word  = 46603 * theta_offset           (phase-accumulator counts per
//                                                degree, 2^24/360 rounded)
// The result is taken modulo 2^24 because the accumulator wraps.
//
// Fixed point: vd_n is signed Q20 (1.0 = 2^20); theta values are carried as
// signed Q20 degrees and the final product is truncated to whole counts.
// The equations and constants follow the amplifier design; the number formats
// are this design's choices.
module amp_a #(
  parameter int          W          = 24,
  parameter int          FRAC       = 20,
  parameter int          PHASE_BITS = 24,
  parameter int          GAIN_DEG   = 120,
  parameter int unsigned COUNTS_PER_DEG = 46603
) (
  input  logic signed [W-1:0]     vd_n,
  output logic signed [39:0]      theta_offset_q,   // Q20 degrees, for observation
  output logic [PHASE_BITS-1:0]   tuning_word
);

  logic signed [39:0] theta_diff_q;
  logic [79:0]        scaled;

  always_comb begin
    theta_diff_q   = -40'(GAIN_DEG) * 40'(vd_n);
    theta_offset_q = (vd_n < 0) ? theta_diff_q : theta_diff_q + (40'sd360 <<< FRAC);
    scaled         = 80'(theta_offset_q) * 80'(COUNTS_PER_DEG);
    tuning_word    = scaled[FRAC +: PHASE_BITS];
  end

endmodule
