// dac_pkg: types and constants shared by the eight-channel analog output board.
//
// The board sits between a host CPU and eight 16-bit voltage output DACs. Each
// channel owns a 128-sample FIFO, a control/status byte, a timer prescaler and
// a 16-bit conversion timer. This package holds the per-channel configuration
// record, the encodings of its fields and the register map offsets.
//
// From the design description: channel count, FIFO depth and sample width, the
// register addresses, the reset values of prescaler (80) and conversion timer
// (1), the four interrupt threshold choices (off, 4, 16, 64) and the minimum
// prescaler value 53. The numeric encoding of the two mode bits is this
// design's own choice.
package dac_pkg;

  localparam int unsigned NUM_CH     = 8;
  localparam int unsigned SAMPLE_W   = 16;
  localparam int unsigned FIFO_DEPTH = 128;
  localparam int unsigned FIFO_AW    = $clog2(FIFO_DEPTH);
  localparam int unsigned COEF_W     = 8;     // one calibration byte per coefficient
  localparam int unsigned ID_BYTES   = 32;

  // Output mode, bits 2..1 of the channel control & status register.
  typedef enum logic [1:0] {
    MODE_OFF    = 2'b00,   // channel does not convert
    MODE_SINGLE = 2'b01,   // one sample per Start Convert
    MODE_CONT   = 2'b10,   // one sample per timer period until stopped
    MODE_EXT    = 2'b11    // external trigger (input or output, bit 3)
  } mode_e;

  // Interrupt threshold, bits 6..5 of the control & status register.
  typedef enum logic [1:0] {
    THR_NONE = 2'b00,
    THR_4    = 2'b01,
    THR_16   = 2'b10,
    THR_64   = 2'b11
  } irq_thr_e;

  // Per-channel configuration written by the host.
  typedef struct packed {
    logic [7:0]  prescaler;  // timer prescaler, clocks per conversion-timer step
    logic [15:0] timer;      // conversion timer, 0 stands for 65536
    irq_thr_e    irq_thr;
    logic        irq_en;
    logic        ext_out;    // 1: trigger pin is an output, 0: input
    mode_e       mode;
  } ch_cfg_t;

  localparam logic [7:0]  PRESCALER_RESET = 8'd80;  // 80 x 1 / 8 MHz = 10 us
  localparam logic [15:0] TIMER_RESET     = 16'd1;

  localparam ch_cfg_t CH_CFG_RESET = '{
    prescaler: PRESCALER_RESET,
    timer:     TIMER_RESET,
    irq_thr:   THR_NONE,
    irq_en:    1'b0,
    ext_out:   1'b0,
    mode:      MODE_OFF
  };

  // Byte offsets from the board base address (big-endian: even byte = D15..D8).
  localparam logic [7:0] REG_RESET_START = 8'h00;  // sw reset | start convert / FIFO full
  localparam logic [7:0] REG_IRQ         = 8'h02;  // interrupt status | interrupt vector
  localparam logic [7:0] REG_CAL_CMD     = 8'h04;  // rd/wr + address | write data
  localparam logic [7:0] REG_CAL_STAT    = 8'h06;  // read data | wr busy, rd complete
  localparam logic [7:0] REG_CH_BASE     = 8'h08;  // first channel block
  localparam int unsigned REG_CH_STRIDE  = 6;      // bytes per channel block

  // Number of samples below which a channel interrupts.
  function automatic logic [FIFO_AW:0] thr_value(irq_thr_e t);
    unique case (t)
      THR_4:   return (FIFO_AW+1)'(4);
      THR_16:  return (FIFO_AW+1)'(16);
      THR_64:  return (FIFO_AW+1)'(64);
      default: return '0;
    endcase
  endfunction

endpackage
