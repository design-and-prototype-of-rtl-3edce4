// clk_div_512: divides the 512*Fs clock (98.304 MHz) by 512 to the Fs clock
// (192 kHz) with 50 % duty cycle.
//
// A 9-bit counter increments on every input edge; the output is 0 while the
// counter is 0..255 and 1 while it is 256..511 (registered, so clk_out rises
// on the input edge where the counter steps from 255 to 256).
// rst (asynchronous, active high) clears the counter and holds clk_out low.
// Counter width and thresholds follow the divider design; the registered output
// and reset behaviour are this design's choices.
module clk_div_512 (
  input  logic clk_in,
  input  logic rst,
  output logic clk_out
);

  logic [8:0] count;
  logic [8:0] count_next;

  assign count_next = count + 1'b1;

  always_ff @(posedge clk_in or posedge rst) begin
    if (rst) begin
      count   <= '0;
      clk_out <= 1'b0;
    end else begin
      count   <= count_next;
      clk_out <= count_next[8];
    end
  end

endmodule
