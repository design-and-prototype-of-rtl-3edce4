// loop_filter: first-order IIR loop filter of the frequency doubler ADPLL.
//
// Implements H(z) = B*(z+1)/(z-A) with B = 0.03635 and A = 0.9273, i.e.
//   vd[n] = B*(pe[n] + pe[n-1]) + A*vd[n-1],
// whose DC gain is 2B/(1-A) = 1: the output settles to the DC part of the phase
// error, -Kd*sin(theta1 - theta2) (-0.5*sin(.) for unit-amplitude inputs), while
// the 38 kHz product term of the multiplier phase detector is attenuated.
//
// Fixed point: pe and vd are signed Q20 (the product of two A(1,10) words); the
// coefficients are COEF_FRAC-bit fractions, B_Q = round(0.03635*2^16) = 2382 and
// A_Q = 60772, chosen so that the quantised DC gain 2*B_Q/(2^16-A_Q) is exactly 1.
// Products are summed at full width and truncated (floor) back to Q20.
//
// Timing: one sample per clock (the Fs clock); vd is registered, so it reflects
// pe one clock later. rst (asynchronous, active high) clears the state.
// The transfer function and coefficient values follow the loop filter chosen for
// the design; the number formats and rounding are this design's choices.
module loop_filter #(
  parameter int          W         = 24,
  parameter int          COEF_FRAC = 16,
  parameter int unsigned B_Q       = 2382,
  parameter int unsigned A_Q       = 60772
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] pe,
  output logic signed [W-1:0] vd
);

  logic signed [W-1:0]  pe_d;
  logic signed [W+COEF_FRAC+2:0] acc;

  assign acc = ($signed({1'b0, B_Q[COEF_FRAC:0]}) * ((W+COEF_FRAC+3)'(pe) + (W+COEF_FRAC+3)'(pe_d)))
             + ($signed({1'b0, A_Q[COEF_FRAC:0]}) * (W+COEF_FRAC+3)'(vd));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pe_d <= '0;
      vd   <= '0;
    end else begin
      pe_d <= pe;
      vd   <= W'(acc >>> COEF_FRAC);
    end
  end

endmodule
