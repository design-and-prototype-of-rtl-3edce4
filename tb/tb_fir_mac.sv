// tb_fir_mac: self-checking test of the single-MAC FIR engine in its three
// demodulator configurations (19 kHz band-pass, 38 kHz band-pass, 15 kHz
// low-pass, 443 taps each).
//
// Each filter gets the same input stream: random samples, then a sequence of
// test tones. Every output is compared bit-exactly with a direct-form
// convolution computed here from independently derived Hamming-window
// coefficients. The latency from nd to rdy is checked against the 230-cycle
// budget, and steady-state tone amplitudes are checked against the intended
// pass-band (0 dB) and stop-band behaviour.
`timescale 1ns/1ps
module tb_fir_mac;
  import mpx_pkg::*;

  localparam int NT = 443;
  localparam int ND_PERIOD = 256;
  localparam int NSAMP = 2900;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic nd  = 1'b0;
  sample_t din = '0;
  always #5 clk = ~clk;

  logic signed [36:0] y [3];
  logic               rdy [3];
  logic               bz  [3];

  fir_mac #(.NTAPS(NT), .COEF_W(16), .COEF_FRAC(19), .FTYPE(FIR_BANDPASS), .FT1(0.088542), .FT2(0.109375))
    u_bp19 (.clk, .rst, .nd, .din, .dout(y[0]), .rdy(rdy[0]), .busy_clear(bz[0]));
  fir_mac #(.NTAPS(NT), .COEF_W(16), .COEF_FRAC(16), .FTYPE(FIR_BANDPASS), .FT1(0.11979), .FT2(0.27604))
    u_bp38 (.clk, .rst, .nd, .din, .dout(y[1]), .rdy(rdy[1]), .busy_clear(bz[1]));
  fir_mac #(.NTAPS(NT), .COEF_W(16), .COEF_FRAC(17), .FTYPE(FIR_LOWPASS), .FT1(0.078125), .FT2(0.0))
    u_lp15 (.clk, .rst, .nd, .din, .dout(y[2]), .rdy(rdy[2]), .busy_clear(bz[2]));

  int checks = 0, failures = 0;
  longint coef [3][NT];
  int     cfrac [3] = '{19, 16, 17};
  int     hist [NT];      // hist[0] = newest
  int     cyc = 0, nd_cyc = 0;
  real    peak [3][4];    // per filter, per tone

  always @(posedge clk) cyc <= cyc + 1;

  function automatic real ideal(int f, int i);
    real m, lo, hi;
    m = real'(i) - real'(NT - 1) / 2.0;
    case (f)
      0: begin lo = 0.088542; hi = 0.109375; end
      1: begin lo = 0.11979; hi = 0.27604; end
      default: begin lo = 0.0; hi = 0.078125; end
    endcase
    if (m == 0.0) return 2.0 * (hi - lo);
    return ($sin(2.0 * 3.141592653589793 * hi * m) - $sin(2.0 * 3.141592653589793 * lo * m))
           / (3.141592653589793 * m);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (NSAMP * ND_PERIOD + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    for (int f = 0; f < 3; f++)
      for (int i = 0; i < NT; i++) begin
        real w;
        w = 0.54 - 0.46 * $cos(2.0 * 3.141592653589793 * real'(i) / real'(NT - 1));
        coef[f][i] = longint'($floor(ideal(f, i) * w * (2.0 ** cfrac[f]) + 0.5));
      end
    for (int i = 0; i < NT; i++) hist[i] = 0;
    for (int f = 0; f < 3; f++) for (int t = 0; t < 4; t++) peak[f][t] = 0.0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    wait (!bz[0] && !bz[1] && !bz[2]);
    @(posedge clk);
    for (int n = 0; n < NSAMP; n++) begin
      int s, tone;
      real fr;
      tone = (n - 500) / 600;           // 0..3 after the random section
      if (n < 500) s = int'($urandom_range(4095)) - 2048;
      else begin
        case (tone)
          0: fr = 19000.0;
          1: fr = 38000.0;
          2: fr = 5000.0;
          default: fr = 60000.0;
        endcase
        s = int'($floor(1000.0 * $cos(2.0 * 3.141592653589793 * fr * real'(n) / 192000.0) + 0.5));
      end
      for (int i = NT - 1; i > 0; i--) hist[i] = hist[i - 1];
      hist[0] = s;
      din <= sample_t'(s);
      nd  <= 1'b1;
      nd_cyc = cyc + 1;
      @(posedge clk);
      nd <= 1'b0;
      wait (rdy[0] && rdy[1] && rdy[2]);
      check(cyc - nd_cyc <= 230, $sformatf("latency %0d cycles above 230", cyc - nd_cyc));
      for (int f = 0; f < 3; f++) begin
        longint g;
        g = 0;
        for (int i = 0; i < NT; i++) g += coef[f][i] * longint'(hist[i]);
        check(longint'(y[f]) == g, $sformatf("filter %0d sample %0d: got %0d want %0d", f, n, y[f], g));
        if (n >= 500 && ((n - 500) % 600) >= 450) begin
          real a;
          a = real'(y[f]) / (2.0 ** cfrac[f]);
          if (a < 0.0) a = -a;
          if (a > peak[f][tone]) peak[f][tone] = a;
        end
      end
      while (cyc - nd_cyc < ND_PERIOD - 1) @(posedge clk);
    end
    // tone 0 = 19 kHz, 1 = 38 kHz, 2 = 5 kHz, 3 = 60 kHz; input amplitude 1000
    $display("peaks bp19: %f %f %f %f", peak[0][0], peak[0][1], peak[0][2], peak[0][3]);
    $display("peaks bp38: %f %f %f %f", peak[1][0], peak[1][1], peak[1][2], peak[1][3]);
    $display("peaks lp15: %f %f %f %f", peak[2][0], peak[2][1], peak[2][2], peak[2][3]);
    check(peak[0][0] > 900 && peak[0][0] < 1100, "19k BPF passband gain");
    check(peak[0][1] < 50 && peak[0][2] < 50,     "19k BPF stopband");
    check(peak[1][1] > 900 && peak[1][1] < 1100, "38k BPF passband gain");
    check(peak[1][0] < 50 && peak[1][2] < 50,     "38k BPF stopband");
    check(peak[2][2] > 900 && peak[2][2] < 1100, "15k LPF passband gain");
    check(peak[2][0] < 50 && peak[2][1] < 50,     "15k LPF stopband");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
