// tb_spi_controller_mpx_enc: the DAC controller drives a behavioural model of
// the SPI core (spi_top_model), which checks the register-write protocol
// (transmit-control word before data, go-write only after it, nothing written
// while a transfer is running) and reports each 24-bit word shifted out.
// Random pilot / left / right samples change on every Fs rising edge (Fs =
// 1/512 of the clock). Checks: the divider register is written before any
// transfer; each Fs period produces exactly three transfers to DAC channels A,
// B, C in that order with command 0011 and the offset-binary code of the
// samples present at that Fs edge; the controller writes no register
// while the core is busy (it waits for the transfer to end); no protocol errors.
`timescale 1ns/1ps
module tb_spi_controller_mpx_enc;
  import mpx_pkg::*;
  localparam int NFS = 60;
  logic clk = 1'b0, rst = 1'b1, clk_fs = 1'b0;
  sample_t pilot = '0, lt_chan = '0, rt_chan = '0;
  logic tip, load_ctrl, load_div, dac_chan_change;
  logic [23:0] data_out, word;
  logic word_stb;
  int protocol_errors, div = 0;
  always #5 clk = ~clk;

  spi_controller_mpx_enc dut (.clk, .rst, .clk_fs, .pilot, .lt_chan, .rt_chan, .tip,
                              .data_out, .load_ctrl, .load_div, .dac_chan_change);
  spi_top_model u_spi (.clk, .rst, .data_in(data_out), .load_ctrl, .load_div, .go(tip),
                       .word, .word_stb, .protocol_errors);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (512 * (NFS + 10)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Fs clock and sample source: new samples on each rising Fs edge
  int nfs = 0;
  always @(posedge clk) begin
    if (!rst) begin
      div <= (div + 1) % 512;
      clk_fs <= ((div + 1) % 512) >= 256;
      if ((div + 1) % 512 == 256) begin
        pilot <= sample_t'($urandom); lt_chan <= sample_t'($urandom); rt_chan <= sample_t'($urandom);
        nfs <= nfs + 1;
      end
    end
  end

  // reference: samples latched on the new-sample event, words expected in order
  logic [23:0] exp_q [$];
  int words_this_fs = 0, bad_word_count = 0, tip_waits = 0;
  bit div_written = 0, div_first = 1;
  always @(posedge clk) begin
    if (rst) exp_q.delete();
    if (load_div && !rst) begin
      div_written = 1;
      check(data_out == 24'd1, "divider value");
    end
    if (load_ctrl && !div_written && !rst) div_first = 0;
    // controller idle (no register write) while the core is transferring
    if (tip && !load_ctrl && !load_div) tip_waits++;
    if (tip && load_ctrl && data_out == CTRL_GOWRITE) check(0, "go-write during a transfer");
    if (dac_chan_change) begin
      if (nfs > 2 && words_this_fs != 3) bad_word_count++;
      words_this_fs = 0;
      check(exp_q.size() == 0, "previous words all sent before the next sample");
      exp_q.delete();
      exp_q.push_back({4'b0011, DAC_ADDR_A, ~pilot[11], pilot[10:0], 4'b0});
      exp_q.push_back({4'b0011, DAC_ADDR_B, ~lt_chan[11], lt_chan[10:0], 4'b0});
      exp_q.push_back({4'b0011, DAC_ADDR_C, ~rt_chan[11], rt_chan[10:0], 4'b0});
    end
    if (word_stb && !rst) begin
      words_this_fs++;
      if (exp_q.size() == 0) check(0, "unexpected transfer");
      else begin
        logic [23:0] w;
        w = exp_q.pop_front();
        check(word == w, $sformatf("DAC word %h, want %h", word, w));
      end
    end
  end

  initial begin : main
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    wait (nfs == NFS);
    repeat (600) @(posedge clk);
    $display("Fs periods %0d, transfer-wait cycles %0d, protocol errors %0d", nfs, tip_waits, protocol_errors);
    check(div_written && div_first, "divider written before first transfer");
    check(bad_word_count == 0, "three transfers per Fs period");
    check(tip_waits > 0, "controller waits for transfer in progress");
    check(protocol_errors == 0, "SPI core register protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
