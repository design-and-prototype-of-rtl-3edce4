// mpx_encoder: stored FM MPX test signal, one sample per Fs clock.
//
// A mod-192 counter (0..191, 8 bits) addresses a 192-entry table holding one
// millisecond of the composite signal at Fs = 192 kHz:
//   m(t) = C0*[L+R] + C1*cos(2*pi*19k*t) + C0*[L-R]*cos(2*pi*38k*t),
//   L = sin(2*pi*5k*t), R = sin(2*pi*7k*t), C0 = 45/200, C1 = 1/10.
// Because 5, 7, 19 and 38 kHz all complete whole periods in 1 ms, the table
// repeats seamlessly. Entries are 12-bit signed Q11 (1.0 = 2048), round to
// nearest, saturated; they are computed at elaboration from the formula above.
//
// Timing: mpx_out is registered; it shows table entry k one clk_fs edge after
// the counter held k. rst (asynchronous, active high) clears counter and output.
// Table length, counter width, wrap value, signal content and the 12-bit signed
// format follow the encoder design; rounding and reset values are this design's
// choices.
module mpx_encoder
  import mpx_pkg::*;
#(
  parameter int  LUT_LEN = 192,
  parameter real FS      = 192000.0,
  parameter real C0      = 45.0 / 200.0,
  parameter real C1      = 1.0 / 10.0
) (
  input  logic    clk_fs,
  input  logic    rst,
  output sample_t mpx_out
);

  typedef sample_t lut_t [LUT_LEN];

  function automatic lut_t make_lut();
    lut_t t;
    for (int n = 0; n < LUT_LEN; n++) begin
      real tt, l, r, m, q;
      tt = real'(n) / FS;
      l  = $sin(2.0 * PI * 5000.0 * tt);
      r  = $sin(2.0 * PI * 7000.0 * tt);
      m  = C0 * (l + r) + C1 * $cos(2.0 * PI * 19000.0 * tt)
         + C0 * (l - r) * $cos(2.0 * PI * 38000.0 * tt);
      q  = $floor(m * 2048.0 + 0.5);
      if (q > 2047.0)  q = 2047.0;
      if (q < -2048.0) q = -2048.0;
      t[n] = sample_t'($rtoi(q));
    end
    return t;
  endfunction

  localparam lut_t LUT = make_lut();

  logic [7:0] count;

  always_ff @(posedge clk_fs or posedge rst) begin
    if (rst) begin
      count   <= '0;
      mpx_out <= '0;
    end else begin
      mpx_out <= LUT[count];
      count   <= (int'(count) == LUT_LEN - 1) ? '0 : count + 1'b1;
    end
  end

endmodule
