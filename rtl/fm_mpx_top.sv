// fm_mpx_top: FPGA top level of the FM MPX demonstration system.
//
// A stored FM MPX test signal (mpx_encoder) is demodulated (mpx_decoder) into
// the 19 kHz pilot, the left channel and the right channel, and the three
// results are written every Fs period to DAC channels A, B and C through an SPI
// core driven by spi_controller_mpx_enc.
//
// Clocks. clk_133MHz is the board oscillator. The 512*Fs clock (98.304 MHz)
// comes from the FPGA's clock manager (133 MHz * 17/23), which is outside this
// RTL: its output enters on clk_512fs, its lock flag on dcm_locked, and its
// reset request leaves on dcm_rst. clk_div_512 derives Fs = 192 kHz from
// clk_512fs; clk_div_10 derives 13.3 MHz from clk_133MHz for the debouncer.
// Resets. The push-button rst is debounced into rst_debounced, which resets
// the clock manager (dcm_rst). rst_global = rst_debounced | ~dcm_locked resets
// everything else, and its inverse drives the DAC's active-low dac_clr.
// SPI. The SPI master core is also outside this RTL: the controller's register
// writes leave on spi_data_in / spi_load_ctrl / spi_load_div, and the core's
// transfer-in-progress flag (its go output) enters on spi_go. The core then
// produces dac_cs, spi_mosi and spi_sck for the DAC.
// ADC. adc_out, ad_conv and amp_cs are reserved for a later ADC front end:
// adc_out is ignored, ad_conv is held low and amp_cs is held high (deselected).
//
// The block partition, clock and reset scheme and port set follow the FPGA
// design; bringing the clock manager and SPI core connections out as ports is
// this design's choice.
module fm_mpx_top
  import mpx_pkg::*;
(
  input  logic        clk_133MHz,
  input  logic        rst,
  input  logic        adc_out,
  input  logic        clk_512fs,
  input  logic        dcm_locked,
  input  logic        spi_go,
  output logic        ad_conv,
  output logic        amp_cs,
  output logic        dac_clr,
  output logic        dcm_rst,
  output logic [23:0] spi_data_in,
  output logic        spi_load_ctrl,
  output logic        spi_load_div
);

  logic    clk_13MHz, clk_fs;
  logic    rst_debounced, rst_global;
  sample_t mpx_sig, pilot, lt_chan, rt_chan;
  logic    dac_chan_change;

  clk_div_10 u_clk_div_10 (.clk_in(clk_133MHz), .clk_out(clk_13MHz));

  debounce u_debounce (.clk(clk_13MHz), .sig_in(rst), .sig_out(rst_debounced));

  assign dcm_rst    = rst_debounced;
  assign rst_global = rst_debounced | ~dcm_locked;
  assign dac_clr    = ~rst_global;
  assign ad_conv    = 1'b0;
  assign amp_cs     = 1'b1;

  clk_div_512 u_clk_div_512 (.clk_in(clk_512fs), .rst(rst_global), .clk_out(clk_fs));

  mpx_encoder u_mpx_encoder (.clk_fs, .rst(rst_global), .mpx_out(mpx_sig));

  mpx_decoder u_mpx_decoder (
    .clk_fir(clk_512fs), .clk_fs, .rst(rst_global), .mpx_sig,
    .pilot, .lt_chan, .rt_chan
  );

  spi_controller_mpx_enc u_spi_controller (
    .clk(clk_512fs), .rst(rst_global), .clk_fs,
    .pilot, .lt_chan, .rt_chan, .tip(spi_go),
    .data_out(spi_data_in), .load_ctrl(spi_load_ctrl), .load_div(spi_load_div),
    .dac_chan_change
  );

endmodule
