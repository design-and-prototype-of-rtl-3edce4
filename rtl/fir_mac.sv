// fir_mac: linear-phase FIR filter on one time-shared multiply-accumulate engine.
//
// Function. y[n] = sum_{i=0}^{NTAPS-1} b_i * x[n-i], with NTAPS = N+1 (N even) and
// symmetric coefficients b_i = b_{N-i}. The coefficients are the window-method
// design: the ideal low-pass (FTYPE = FIR_LOWPASS, cut-off FT1) or band-pass
// (FIR_BANDPASS, FT1..FT2) impulse response, frequencies normalised to Fs, times a
// Hamming window 0.54 - 0.46*cos(2*pi*i/N), quantised to COEF_W bits with
// COEF_FRAC fractional bits (round to nearest). They are computed at elaboration,
// so no coefficient file is needed.
//
// Structure. Input samples live in a circular buffer of NTAPS words. On a new
// sample (nd) the engine walks the (NTAPS+1)/2 coefficient indices; each step
// pre-adds the two samples that share a coefficient, multiplies once and
// accumulates (a symmetric single-MAC structure). The default N = 442 therefore
// takes 222 MAC cycles, and a 512*Fs clock leaves ample room for one output per
// Fs period.
//
// Interface and timing. clk is the fast filter clock; nd is a one-cycle strobe
// that loads din. rdy pulses for one cycle with the full-precision result on dout
// (Q(11+COEF_FRAC)) LATENCY = (NTAPS+1)/2 + 4 cycles after nd (226 cycles for the
// defaults), and dout holds until the next result. rst is an asynchronous
// active-high clear; after it the engine spends NTAPS cycles zeroing the sample
// buffer (busy_clear high) and ignores nd meanwhile.
//
// The tap count, coefficient width/fractional bits, 12-bit Q11 input and 37-bit
// output follow the FPGA filters; the buffer clearing, the exact pipeline and the
// coefficient rounding are this design's choices.
module fir_mac
  import mpx_pkg::*;
#(
  parameter int        NTAPS     = 443,
  parameter int        COEF_W    = 16,
  parameter int        COEF_FRAC = 19,
  parameter fir_type_e FTYPE     = FIR_BANDPASS,
  parameter real       FT1       = 0.088542,
  parameter real       FT2       = 0.109375,
  parameter int        OUT_W     = 37
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    nd,
  input  sample_t                 din,
  output logic signed [OUT_W-1:0] dout,
  output logic                    rdy,
  output logic                    busy_clear
);

  localparam int ORDER   = NTAPS - 1;
  localparam int HALF    = ORDER / 2;          // index of the centre tap
  localparam int NUNIQ   = HALF + 1;           // distinct coefficients
  localparam int AW      = $clog2(NTAPS);
  localparam int IW      = $clog2(NUNIQ + 1);
  localparam int LATENCY = NUNIQ + 4;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t coef_tab_t [NUNIQ];

  function automatic coef_tab_t design_coefs();
    coef_tab_t t;
    for (int i = 0; i < NUNIQ; i++) begin
      real k, h, w, q;
      k = real'(i - HALF);
      if (i == HALF) begin
        h = (FTYPE == FIR_LOWPASS) ? 2.0 * FT1 : 2.0 * (FT2 - FT1);
      end else if (FTYPE == FIR_LOWPASS) begin
        h = $sin(2.0 * PI * FT1 * k) / (PI * k);
      end else begin
        h = ($sin(2.0 * PI * FT2 * k) - $sin(2.0 * PI * FT1 * k)) / (PI * k);
      end
      w = 0.54 - 0.46 * $cos(2.0 * PI * real'(i) / real'(ORDER));
      q = $floor(h * w * (2.0 ** COEF_FRAC) + 0.5);
      t[i] = coef_t'($rtoi(q));
    end
    return t;
  endfunction

  localparam coef_tab_t COEF = design_coefs();

  initial begin
    assert (NTAPS % 2 == 1) else $fatal(1, "fir_mac: NTAPS must be odd");
    assert (LATENCY < FIR_CLK_PER_FS / 2)
      else $fatal(1, "fir_mac: one output per Fs half-period needs fewer taps");
  end

  // ---------------- sample buffer ----------------
  sample_t          buf_mem [NTAPS];
  logic [AW-1:0]    wr_ptr;          // slot the next sample goes to
  logic [AW-1:0]    newest;          // slot of x[n] for the running computation
  logic [AW-1:0]    clr_ptr;

  function automatic logic [AW-1:0] wrap_add(input logic [AW-1:0] a, input int b);
    int s;
    s = int'(a) + b;
    if (s >= NTAPS) s -= NTAPS;
    return AW'(s);
  endfunction

  function automatic logic [AW-1:0] wrap_sub(input logic [AW-1:0] a, input int b);
    int s;
    s = int'(a) - b;
    if (s < 0) s += NTAPS;
    return AW'(s);
  endfunction

  // ---------------- sequencer ----------------
  logic            run;
  logic [IW-1:0]   idx;
  logic [AW-1:0]   addr_a, addr_b;

  assign addr_a = wrap_sub(newest, int'(idx));        // x[n-i]
  assign addr_b = wrap_add(newest, int'(idx) + 1);    // x[n-(N-i)]

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      busy_clear <= 1'b1;
      clr_ptr    <= '0;
      wr_ptr     <= '0;
      newest     <= '0;
      run        <= 1'b0;
      idx        <= '0;
    end else if (busy_clear) begin
      buf_mem[clr_ptr] <= '0;
      if (int'(clr_ptr) == NTAPS - 1) busy_clear <= 1'b0;
      else                            clr_ptr <= clr_ptr + 1'b1;
    end else begin
      if (nd) begin
        buf_mem[wr_ptr] <= din;
        newest          <= wr_ptr;
        wr_ptr          <= wrap_add(wr_ptr, 1);
        run             <= 1'b1;
        idx             <= '0;
      end else if (run) begin
        if (int'(idx) == NUNIQ - 1) run <= 1'b0;
        else                        idx <= idx + 1'b1;
      end
    end
  end

  // ---------------- MAC pipeline ----------------
  logic signed [SAMPLE_W:0]          pre;      // pre-added sample pair
  coef_t                             c1;
  logic                              v1, first1, last1;
  logic signed [SAMPLE_W+COEF_W:0]   prod;
  logic                              v2, first2, last2;
  logic signed [OUT_W-1:0]           acc;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pre <= '0; c1 <= '0; v1 <= 1'b0; first1 <= 1'b0; last1 <= 1'b0;
      prod <= '0; v2 <= 1'b0; first2 <= 1'b0; last2 <= 1'b0;
      acc <= '0; dout <= '0; rdy <= 1'b0;
    end else begin
      // stage 1: read the pair and its coefficient
      v1     <= run && !nd;
      first1 <= (idx == '0);
      last1  <= (int'(idx) == NUNIQ - 1);
      c1     <= COEF[idx];
      if (int'(idx) == HALF) pre <= (SAMPLE_W+1)'(buf_mem[addr_a]);
      else                   pre <= (SAMPLE_W+1)'(buf_mem[addr_a]) + (SAMPLE_W+1)'(buf_mem[addr_b]);
      // stage 2: multiply
      v2     <= v1;
      first2 <= first1;
      last2  <= last1;
      prod   <= pre * c1;
      // stage 3: accumulate, publish on the last product
      rdy    <= 1'b0;
      if (v2) begin
        if (first2) acc <= OUT_W'(prod);
        else        acc <= acc + OUT_W'(prod);
        if (last2) begin
          dout <= (first2 ? '0 : acc) + OUT_W'(prod);
          rdy  <= 1'b1;
        end
      end
    end
  end

endmodule
