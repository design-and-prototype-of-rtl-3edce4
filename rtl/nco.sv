// nco: numerically controlled oscillator of the frequency doubler.
//
// A PHASE_W-bit phase accumulator adds a frequency tuning word (ftw) and a phase
// tuning word (ptw) to its phase register on every Fs clock. The upper LUT_AW
// bits of the adder output (the truncated phase) address a sine LUT, giving the
// 19 kHz sine fed back to the phase detector, and, shifted left by one bit
// (phase times two, modulo one turn), a cosine LUT, giving the 38 kHz local
// oscillator. A one-cycle non-zero ptw shifts the phase permanently, which is how
// the loop corrects phase.
//
// Both LUTs hold 2^LUT_AW samples of one full period with amplitude 2^OUT_FRAC
// (A(1,10): 1.0 = 1024), round to nearest, computed at elaboration. They are read
// with the adder output as address and registered on the same edge as the phase
// register, so sine and cos2x always belong to the phase currently in the
// register. Outputs change one clock after the tuning words are applied.
// rst (asynchronous, active high) clears the phase to zero (sine = 0,
// cos2x = +1.0).
//
// Accumulator width, truncated address width, the two separate full-period LUTs,
// the times-two addressing by a shift and the A(1,10) output format follow the
// frequency doubler design; the reset value is this design's choice.
module nco
  import mpx_pkg::*;
#(
  parameter int PHASE_BITS = 24,
  parameter int ADDR_BITS  = 12,
  parameter int OUT_FRAC   = 10
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [PHASE_BITS-1:0] ftw,
  input  logic [PHASE_BITS-1:0] ptw,
  output logic [PHASE_BITS-1:0] phase,
  output sample_t               sine,
  output sample_t               cos2x
);

  localparam int DEPTH = 1 << ADDR_BITS;
  typedef sample_t lut_t [DEPTH];

  function automatic lut_t make_lut(input bit cosine);
    lut_t t;
    for (int i = 0; i < DEPTH; i++) begin
      real a, v;
      a = 2.0 * PI * real'(i) / real'(DEPTH);
      v = (cosine ? $cos(a) : $sin(a)) * (2.0 ** OUT_FRAC);
      t[i] = sample_t'($rtoi($floor(v + 0.5)));
    end
    return t;
  endfunction

  localparam lut_t SIN_LUT = make_lut(1'b0);
  localparam lut_t COS_LUT = make_lut(1'b1);

  logic [PHASE_BITS-1:0] sum;
  logic [ADDR_BITS-1:0]  addr, addr2x;

  assign sum    = phase + ftw + ptw;
  assign addr   = sum[PHASE_BITS-1 -: ADDR_BITS];
  assign addr2x = {addr[ADDR_BITS-2:0], 1'b0};

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      phase <= '0;
      sine  <= SIN_LUT[0];
      cos2x <= COS_LUT[0];
    end else begin
      phase <= sum;
      sine  <= SIN_LUT[addr];
      cos2x <= COS_LUT[addr2x];
    end
  end

endmodule
