// mpx_pkg: types and constants shared by the FM MPX demodulator.
//
// Number formats. All audio-rate signals are 12-bit two's-complement words, the
// width of the board DAC. Two fixed-point formats are used:
//   Q11  (1 sign bit, 11 fractional bits, range [-1,1)): MPX samples, FIR inputs,
//        demodulated left/right channels.
//   A(1,10) (1 sign bit, 1 integer bit, 10 fractional bits, range [-2,2)): NCO
//        sine/cosine outputs and the full-scale pilot, so that an amplitude of
//        1.0 (1024) is representable.
// The sampling rate Fs is 192 kHz; the FIR filters and the DAC interface run on
// a 512*Fs clock. The DAC command/address codes and the two SPI-core control
// words are the values used with the board DAC and SPI core.
package mpx_pkg;

  localparam int  SAMPLE_W      = 12;
  localparam int  Q11_FRAC      = 11;
  localparam int  A110_FRAC     = 10;
  localparam int  FS_HZ         = 192_000;
  localparam int  FIR_CLK_PER_FS = 512;

  localparam real PI = 3.14159265358979323846;

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  typedef enum logic {
    FIR_LOWPASS  = 1'b0,
    FIR_BANDPASS = 1'b1
  } fir_type_e;

  // NCO
  localparam int PHASE_W = 24;
  localparam int LUT_AW  = 12;

  // Board DAC 24-bit command word: {command, address, 12-bit data, 4 don't care}
  localparam logic [3:0] DAC_CMD_WRITE_UPDATE = 4'b0011;
  localparam logic [3:0] DAC_ADDR_A = 4'b0000;
  localparam logic [3:0] DAC_ADDR_B = 4'b0001;
  localparam logic [3:0] DAC_ADDR_C = 4'b0010;

  // SPI core control words
  localparam logic [23:0] CTRL_TXC     = 24'h002E18;
  localparam logic [23:0] CTRL_GOWRITE = 24'h000F98;

  // Saturate a wide signed value to a 12-bit sample.
  function automatic sample_t sat12(input logic signed [47:0] v);
    if (v > 48'sd2047)       return sample_t'(12'sd2047);
    else if (v < -48'sd2048) return sample_t'(-12'sd2048);
    else                     return sample_t'(v[SAMPLE_W-1:0]);
  endfunction

  // Signed 12-bit sample to the offset-binary code the unipolar DAC expects.
  function automatic logic [11:0] to_dac_code(input sample_t s);
    return {~s[11], s[10:0]};
  endfunction

endpackage
