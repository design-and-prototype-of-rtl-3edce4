// spi_controller_mpx_enc: sequences the SPI core so that every new Fs sample of
// the pilot, left and right channels is written to DAC channels A, B and C.
//
// Each channel word is the 24-bit DAC command
//   {command 0011 (write and update), address, 12-bit data, 4 don't-care bits}
// with the signed sample converted to the DAC's offset-binary code. Per channel
// the FSM writes CTRL_TXC to the core's CTRL register (load_ctrl), presents the
// channel word for the Data TX register, writes CTRL_GOWRITE (load_ctrl) to
// start the transfer, then waits while the core reports a transfer in progress
// (tip, the core's go output). States, in order:
//   INIT, SET_DIV, TXC_A, DATA_A, WRITE_A, TIP_A, TXC_B, DATA_B, WRITE_B, TIP_B,
//   TXC_C, DATA_C, WRITE_C, TIP_C, TX_WRITE_COMPLETE.
// SET_DIV presents the SCK divider value (load_div) and waits for the first new
// sample; TX_WRITE_COMPLETE waits for the next one. A new sample
// (dac_chan_change) is a rising clk_fs seen in the clk domain; the three
// samples are captured into holding registers at that moment so that the three
// DAC words always belong to the same sample.
//
// Interface: clk is the 512*Fs clock, clk_fs the Fs clock (sampled as data).
// tip must rise in the cycle after the GOWRITE write (the core registers it).
// rst (asynchronous, active high) returns the FSM to INIT. Two assertions check
// the bus rules: one register write per clock, no GOWRITE while tip is high.
//
// The states, the command words, the DAC word layout and the channel mapping
// follow the controller design. The separate load_div strobe, the divider value,
// the holding registers and the offset-binary conversion are this design's
// choices, since the core's register map is not part of this design.
module spi_controller_mpx_enc
  import mpx_pkg::*;
#(
  parameter logic [23:0] SPI_DIV = 24'd1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        clk_fs,
  input  sample_t     pilot,
  input  sample_t     lt_chan,
  input  sample_t     rt_chan,
  input  logic        tip,
  output logic [23:0] data_out,
  output logic        load_ctrl,
  output logic        load_div,
  output logic        dac_chan_change
);

  typedef enum logic [3:0] {
    ST_INIT, ST_SET_DIV,
    ST_TXC_A, ST_DATA_A, ST_WRITE_A, ST_TIP_A,
    ST_TXC_B, ST_DATA_B, ST_WRITE_B, ST_TIP_B,
    ST_TXC_C, ST_DATA_C, ST_WRITE_C, ST_TIP_C,
    ST_TX_WRITE_COMPLETE
  } state_e;

  state_e        state, state_nx;
  logic          fs_d;
  logic [23:0]   word_a, word_b, word_c;

  function automatic logic [23:0] dac_word(input logic [3:0] addr, input sample_t s);
    return {DAC_CMD_WRITE_UPDATE, addr, to_dac_code(s), 4'b0000};
  endfunction

  assign dac_chan_change = clk_fs & ~fs_d;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      fs_d   <= 1'b0;
      state  <= ST_INIT;
      word_a <= '0;
      word_b <= '0;
      word_c <= '0;
    end else begin
      fs_d  <= clk_fs;
      state <= state_nx;
      if (dac_chan_change) begin
        word_a <= dac_word(DAC_ADDR_A, pilot);
        word_b <= dac_word(DAC_ADDR_B, lt_chan);
        word_c <= dac_word(DAC_ADDR_C, rt_chan);
      end
    end
  end

  always_comb begin
    state_nx  = state;
    data_out  = '0;
    load_ctrl = 1'b0;
    load_div  = 1'b0;
    unique case (state)
      ST_INIT:    state_nx = ST_SET_DIV;
      ST_SET_DIV: begin
        data_out = SPI_DIV;
        load_div = 1'b1;
        if (dac_chan_change) state_nx = ST_TXC_A;
      end
      ST_TXC_A, ST_TXC_B, ST_TXC_C: begin
        data_out  = CTRL_TXC;
        load_ctrl = 1'b1;
        state_nx  = state_e'(state + 1'b1);
      end
      ST_DATA_A: begin data_out = word_a; state_nx = ST_WRITE_A; end
      ST_DATA_B: begin data_out = word_b; state_nx = ST_WRITE_B; end
      ST_DATA_C: begin data_out = word_c; state_nx = ST_WRITE_C; end
      ST_WRITE_A, ST_WRITE_B, ST_WRITE_C: begin
        data_out  = CTRL_GOWRITE;
        load_ctrl = 1'b1;
        state_nx  = state_e'(state + 1'b1);
      end
      ST_TIP_A: if (!tip) state_nx = ST_TXC_B;
      ST_TIP_B: if (!tip) state_nx = ST_TXC_C;
      ST_TIP_C: if (!tip) state_nx = ST_TX_WRITE_COMPLETE;
      ST_TX_WRITE_COMPLETE: if (dac_chan_change) state_nx = ST_TXC_A;
      default: state_nx = ST_INIT;
    endcase
  end

  // Register-bus rules of the SPI core: at most one register written per clock,
  // and no transfer started while one is still in progress.
  a_one_register_write: assert property (@(posedge clk) disable iff (rst)
    !(load_ctrl && load_div));
  a_no_go_during_transfer: assert property (@(posedge clk) disable iff (rst)
    !(tip && load_ctrl && data_out == CTRL_GOWRITE));

endmodule
