// spi_top_model: behavioural stand-in for the SPI master core, for simulation
// only. It decodes the controller's register writes the way the core is used:
//   load_div            : data_in is the SCK divider
//   load_ctrl, CTRL_TXC : arms the Data TX register, which then captures
//                         data_in on every cycle without load_ctrl
//   load_ctrl, CTRL_GOWRITE : starts a 24-bit transfer of Data TX
// During a transfer go is high for 24 * 2 * (divider + 1) clocks; it rises on the
// clock edge that accepts the GOWRITE write. Each started transfer is reported
// on word / word_stb (one-cycle pulse) so that a testbench can check it.
module spi_top_model
  import mpx_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [23:0] data_in,
  input  logic        load_ctrl,
  input  logic        load_div,
  output logic        go,
  output logic [23:0] word,
  output logic        word_stb,
  output int          protocol_errors
);
  logic [23:0] div, dtx;
  logic        txc;
  int          remaining;

  always @(posedge clk or posedge rst) begin
    if (rst) begin
      div <= 24'd1; dtx <= '0; txc <= 1'b0; go <= 1'b0; remaining <= 0;
      word <= '0; word_stb <= 1'b0; protocol_errors <= 0;
    end else begin
      word_stb <= 1'b0;
      if (load_div) div <= data_in;
      if (load_ctrl && (data_in == CTRL_TXC)) begin
        if (go) protocol_errors <= protocol_errors + 1;
        txc <= 1'b1;
      end else if (load_ctrl && (data_in == CTRL_GOWRITE)) begin
        if (go || !txc) protocol_errors <= protocol_errors + 1;
        go        <= 1'b1;
        txc       <= 1'b0;
        remaining <= 24 * 2 * (int'(div) + 1);
        word      <= dtx;
        word_stb  <= 1'b1;
      end else if (load_ctrl) begin
        protocol_errors <= protocol_errors + 1;
      end else if (txc) begin
        dtx <= data_in;
      end
      if (go) begin
        if (remaining <= 1) go <= 1'b0;
        remaining <= remaining - 1;
      end
    end
  end
endmodule
