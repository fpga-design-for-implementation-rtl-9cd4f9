// channel_ctrl: output sequencer of one channel (conversion clock domain).
//
// Start Convert arms the channel and restarts its conversion timer. What then
// triggers a conversion depends on the mode bits of the channel's control
// register:
//   single      - the first timer tick after Start Convert converts one sample,
//                 then the channel disarms until the next Start Convert;
//   continuous  - every timer tick converts the next sample, so the FIFO is
//                 played out at prescaler*timer/8 us per sample;
//   ext trigger - with the external I/O bit at 0 (input) each rising edge of
//                 the trigger input converts one sample; with it at 1 (output)
//                 the timer paces the channel as in continuous mode and each
//                 conversion is announced by a one-clock pulse on trig_out;
//   off         - Start Convert is ignored.
// A conversion pops the FIFO (ren), passes the word to the calibrator the
// next clock (cal_valid) and starts the SPI frame when the calibrated word
// appears (spi_start, driven from outside by the calibrator's out_valid). A
// trigger that finds the FIFO empty is an underrun and a trigger that finds
// the previous conversion still in flight is an overrun: both are skipped and
// the DAC holds its last value. The modes and their meaning follow the design
// description; the encodings, disarming and underrun/overrun handling are this
// design's choices.
module channel_ctrl
  import dac_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,          // hardware or channel software reset
  input  mode_e   mode,
  input  logic    ext_out,
  input  logic    start,          // Start Convert, one clock
  input  logic    trig_in,        // synchronized external trigger level
  input  logic    tick,           // from conv_timer
  input  logic    fifo_empty,
  input  logic    spi_busy,
  input  logic    cal_busy,       // calibrated word not yet handed to SPI
  output logic    timer_en,
  output logic    timer_clear,
  output logic    ren,
  output logic    cal_valid,
  output logic    trig_out,
  output logic    underrun,       // one-clock event flags
  output logic    overrun,
  output logic    running
);
  logic trig_q;
  logic trig_rise;
  logic convert_req;
  logic busy;

  assign trig_rise   = trig_in && !trig_q;
  assign busy        = spi_busy || cal_busy || cal_valid;
  assign timer_clear = start;
  assign timer_en    = running && !(mode == MODE_EXT && !ext_out);

  always_comb begin
    convert_req = 1'b0;
    if (running) begin
      unique case (mode)
        MODE_SINGLE, MODE_CONT: convert_req = tick;
        MODE_EXT:               convert_req = ext_out ? tick : trig_rise;
        default:                convert_req = 1'b0;
      endcase
    end
  end

  assign ren = convert_req && !fifo_empty && !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running   <= 1'b0;
      trig_q    <= 1'b0;
      cal_valid <= 1'b0;
      trig_out  <= 1'b0;
      underrun  <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      trig_q    <= trig_in;
      cal_valid <= ren;
      trig_out  <= ren && mode == MODE_EXT && ext_out;
      underrun  <= convert_req && fifo_empty;
      overrun   <= convert_req && !fifo_empty && busy;
      if (start)                               running <= (mode != MODE_OFF);
      else if (mode == MODE_OFF)               running <= 1'b0;
      else if (mode == MODE_SINGLE && convert_req) running <= 1'b0;
    end
  end

  // A word is popped only when the FIFO holds one and the pipeline is free.
  a_pop_rule: assert property (@(posedge clk) disable iff (!rst_n) ren |-> !fifo_empty && !spi_busy);

endmodule
