// debounce: filters the bouncing reset push button.
//
// The input is first passed through two synchroniser flops, then SAMPLES
// successive values are kept in a shift register. The output changes only when
// all SAMPLES stored values agree: to 1 when all are 1, to 0 when all are 0;
// otherwise it holds. A bounce shorter than SAMPLES clocks never reaches the
// output. Runs on the 13.3 MHz clock; output delay is SAMPLES+2 clocks.
// There is no reset input; the registers start at 0.
// Comparing stored past samples with the current one follows the debouncer's
// description; the synchroniser, the agreement rule and SAMPLES = 3 are this
// design's choices.
module debounce #(
  parameter int SAMPLES = 3
) (
  input  logic clk,
  input  logic sig_in,
  output logic sig_out = 1'b0
);

  logic [1:0]         sync = '0;
  logic [SAMPLES-1:0] hist = '0;

  always_ff @(posedge clk) begin
    sync <= {sync[0], sig_in};
    hist <= {hist[SAMPLES-2:0], sync[1]};
    if (&hist)      sig_out <= 1'b1;
    else if (~|hist) sig_out <= 1'b0;
  end

endmodule
