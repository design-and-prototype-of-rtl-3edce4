// clk_div_10: divides the 133 MHz board clock by 10 (13.3 MHz) with a 50 %
// duty cycle, for the reset debouncer.
//
// A 4-bit counter runs through 1..10: the output is 1 for counter values 5..9
// and 0 otherwise; on reaching 10 the counter restarts at 1. The output is
// registered. There is no reset input: the counter starts at 0 and any value
// of 10 or more is sent back to 1, so the divider self-starts.
// Counter width and thresholds follow the divider design.
module clk_div_10 (
  input  logic clk_in,
  output logic clk_out = 1'b0
);

  logic [3:0] count = '0;

  always_ff @(posedge clk_in) begin
    if (count >= 4'd10) begin
      count   <= 4'd1;
      clk_out <= 1'b0;
    end else begin
      count   <= count + 1'b1;
      clk_out <= (count >= 4'd5);
    end
  end

endmodule
