// freq_doubler: all-digital PLL that locks to the recovered 19 kHz pilot and
// produces the phase-locked 38 kHz cosine used to bring L-R back to baseband.
//
// Loop: phase detector (signed multiplier) -> loop_filter -> amp_a -> nco.
//   * The recovered pilot (Q11, about 0.1 amplitude) is multiplied by PILOT_GAIN
//     (10) to a full-scale cosine u1 in A(1,10) format; u1 is also an output.
//   * The phase detector forms pe = u1 * u2, where u2 is the NCO's 19 kHz sine.
//     Its DC part is -0.5*sin(theta1 - theta2).
//   * The loop filter extracts that DC value, vd_n.
//   * Strobing: vd_n is only acted upon every STROBE_WAIT Fs cycles (500 us,
//     twice the ~250 us vd_n settling time). On a strobe, amp_a turns vd_n into a
//     phase tuning word that is applied to the NCO for exactly one Fs cycle; at
//     all other times the phase tuning word is zero and the NCO free-runs at
//     FTW (1,660,245 = 19 kHz * 2^24 / 192 kHz).
//   * The NCO's doubled-phase cosine LUT output is the 38 kHz LO.
// Timing: everything runs on the Fs clock. u1 (pilot_fs), sine19 and lo38 are
// registered on the same edge, so lo38 lines up with the pilot sample that was
// registered into u1; a caller that mixes lo38 with another filter output must
// delay that output by the same one register. strobe is high in the cycle the
// phase correction is applied. rst is asynchronous, active high.
//
// The loop structure, the gains, the NCO sizes and the 500 us strobe interval
// follow the frequency doubler design. The exact strobe sequencing (a free
// running counter, one-cycle correction, no other loop state reset) is this
// design's reading of the strobe flow.
module freq_doubler
  import mpx_pkg::*;
#(
  parameter int          STROBE_WAIT = 96,
  parameter logic [23:0] FTW         = 24'd1660245,
  parameter int          PILOT_GAIN  = 10
) (
  input  logic               clk,
  input  logic               rst,
  input  sample_t            pilot_in,   // Q11 recovered pilot
  output sample_t            pilot_fs,   // A(1,10) full-scale pilot (u1)
  output sample_t            sine19,     // A(1,10) NCO sine (u2)
  output sample_t            lo38,       // A(1,10) 38 kHz cosine LO
  output logic signed [23:0] vd_n,       // Q20 loop-filter output
  output logic               strobe
);

  localparam int CW = $clog2(STROBE_WAIT);

  logic signed [23:0] pe;
  logic [23:0]        tw, ptw;
  logic [CW-1:0]      cnt;
  logic signed [39:0] theta_offset_q;

  // full-scale pilot: Q11 * 10 -> A(1,10) is (x * 10) / 2
  always_ff @(posedge clk or posedge rst) begin
    if (rst) pilot_fs <= '0;
    else     pilot_fs <= sat12(48'(pilot_in) * 48'(PILOT_GAIN) >>> 1);
  end

  // multiplier phase detector, registered
  always_ff @(posedge clk or posedge rst) begin
    if (rst) pe <= '0;
    else     pe <= 24'(pilot_fs) * 24'(sine19);
  end

  loop_filter u_lf (.clk, .rst, .pe, .vd(vd_n));

  amp_a u_amp (.vd_n, .theta_offset_q, .tuning_word(tw));

  // strobe every STROBE_WAIT cycles
  always_ff @(posedge clk or posedge rst) begin
    if (rst) cnt <= '0;
    else if (int'(cnt) == STROBE_WAIT - 1) cnt <= '0;
    else cnt <= cnt + 1'b1;
  end

  assign strobe = (int'(cnt) == STROBE_WAIT - 1);
  assign ptw    = strobe ? tw : '0;

  nco u_nco (.clk, .rst, .ftw(FTW), .ptw, .phase(), .sine(sine19), .cos2x(lo38));

endmodule
