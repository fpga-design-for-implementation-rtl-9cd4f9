// dac_channel: one of the eight independent analog output channels.
//
// The host writes samples into the channel's 128 x 16 asynchronous FIFO in
// the bus clock domain. In the 8 MHz conversion clock domain the conversion
// timer (prescaler x timer double counter) paces the sequencer, which pops one
// sample per conversion, corrects it with the channel's gain and offset
// coefficients and sends the result to the channel's DAC over a write-only
// SPI link with its own SCLK, SDI, CS and LDAC. The structure follows the
// design description.
//
// Latency from a conversion trigger to CS falling: the FIFO word is read on
// the trigger clock, calibrated on the next and the SPI frame starts on the
// third; the frame then takes 33 clocks. cfg, gain, offset and unipolar come
// from the bus domain and are treated as static while the channel runs;
// start arrives already synchronized, trig_in is synchronized here.
module dac_channel
  import dac_pkg::*;
#(
  parameter int unsigned DEPTH    = FIFO_DEPTH,
  parameter int unsigned SPI_HALF = 1
) (
  // bus clock domain
  input  logic                    clk_bus,
  input  logic                    rst_bus_n,     // hardware or software reset
  input  logic                    fifo_wen,
  input  logic [SAMPLE_W-1:0]     fifo_wdata,
  output logic                    fifo_full,
  output logic                    fifo_empty,
  output logic [$clog2(DEPTH):0]  fifo_count,
  // conversion clock domain
  input  logic                    clk_conv,
  input  logic                    rst_conv_n,    // hardware or software reset
  input  ch_cfg_t                 cfg,
  input  logic                    start,
  input  logic [COEF_W-1:0]       gain_err,
  input  logic [COEF_W-1:0]       off_err,
  input  logic                    unipolar,
  input  logic                    trig_in,
  output logic                    trig_out,
  output logic                    trig_oe,
  output logic                    dac_sclk,
  output logic                    dac_sdi,
  output logic                    dac_cs_n,
  output logic                    dac_ldac_n,
  output logic                    underrun,
  output logic                    overrun
);
  logic                ren, rempty;
  logic [SAMPLE_W-1:0] rdata;
  logic                tick, timer_en, timer_clear;
  logic                cal_valid, cal_out_valid;
  logic [SAMPLE_W-1:0] cal_out;
  logic                spi_busy;
  logic                trig_sync;

  async_fifo #(.DW(SAMPLE_W), .DEPTH(DEPTH)) u_fifo (
    .wclk(clk_bus), .wrst_n(rst_bus_n), .wen(fifo_wen), .wdata(fifo_wdata),
    .wfull(fifo_full), .wempty(fifo_empty), .wcount(fifo_count),
    .rclk(clk_conv), .rrst_n(rst_conv_n), .ren(ren), .rdata(rdata), .rempty(rempty)
  );

  sync_ff #(.W(1)) u_trig_sync (.clk(clk_conv), .rst_n(rst_conv_n), .d(trig_in), .q(trig_sync));

  conv_timer u_timer (
    .clk(clk_conv), .rst_n(rst_conv_n), .clear(timer_clear), .en(timer_en),
    .prescaler(cfg.prescaler), .timer(cfg.timer), .tick(tick)
  );

  channel_ctrl u_ctrl (
    .clk(clk_conv), .rst_n(rst_conv_n), .mode(cfg.mode), .ext_out(cfg.ext_out),
    .start(start), .trig_in(trig_sync), .tick(tick), .fifo_empty(rempty),
    .spi_busy(spi_busy), .cal_busy(cal_out_valid),
    .timer_en(timer_en), .timer_clear(timer_clear), .ren(ren), .cal_valid(cal_valid),
    .trig_out(trig_out), .underrun(underrun), .overrun(overrun), .running()
  );

  calibrator #(.DW(SAMPLE_W), .COEF_W(COEF_W)) u_cal (
    .clk(clk_conv), .rst_n(rst_conv_n), .in_valid(cal_valid), .in_data(rdata),
    .gain_err(gain_err), .off_err(off_err), .unipolar(unipolar),
    .out_valid(cal_out_valid), .out_data(cal_out)
  );

  spi_master #(.DW(SAMPLE_W), .HALF(SPI_HALF)) u_spi (
    .clk(clk_conv), .rst_n(rst_conv_n), .start(cal_out_valid), .data(cal_out),
    .busy(spi_busy), .done(), .sclk(dac_sclk), .sdi(dac_sdi),
    .cs_n(dac_cs_n), .ldac_n(dac_ldac_n)
  );

  assign trig_oe = (cfg.mode == MODE_EXT) && cfg.ext_out;

endmodule
