// sync_delay: fixed delay of a 12-bit sample stream by DELAY clocks.
//
// Used as the sum-path aligner of the MPX decoder: the L-R path passes through
// one more FIR filter than the L+R path, so the L+R term is delayed before the
// two are added and subtracted. The default of 29 Fs cycles is the alignment
// that makes the 192-sample (1 ms periodic) test signal demodulate correctly: a
// 443-tap filter delays by 221 samples, and 221 = 192 + 29. For an arbitrary
// (non-periodic) input set DELAY to (NTAPS-1)/2 = 221.
//
// A circular buffer of DELAY words: each clock the oldest word is output and the
// new one written in its place, so dout(t) = din(t - DELAY) exactly, with a
// registered output. rst (asynchronous, active high) zeroes the read register;
// the buffer content before DELAY samples have entered is not cleared.
// The delay value follows the design; the buffer structure is this design's
// choice.
module sync_delay
  import mpx_pkg::*;
#(
  parameter int DELAY = 29
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t din,
  output sample_t dout
);

  localparam int AW = (DELAY > 2) ? $clog2(DELAY - 1) : 1;

  if (DELAY == 1) begin : g_one
    always_ff @(posedge clk or posedge rst) begin
      if (rst) dout <= '0;
      else     dout <= din;
    end
  end else begin : g_ring
    // DELAY-1 stored words plus the output register
    sample_t       mem [DELAY-1];
    logic [AW-1:0] ptr;
    always_ff @(posedge clk or posedge rst) begin
      if (rst) begin
        ptr  <= '0;
        dout <= '0;
      end else begin
        dout     <= mem[ptr];
        mem[ptr] <= din;
        ptr      <= (int'(ptr) == DELAY - 2) ? '0 : ptr + 1'b1;
      end
    end
  end

endmodule
