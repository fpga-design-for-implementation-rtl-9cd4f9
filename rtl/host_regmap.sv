// host_regmap: host bus slave and register map of the analog output board.
//
// The host sees 16-bit registers at an 8-bit byte address, big-endian: the
// even byte of a word is D15..D8, the odd byte D7..D0, and either byte can be
// written alone. The map follows the design description:
//   00 hi  channel software reset   write 1 to bit 8+n resets channel n
//   00 lo  start convert (write) / FIFO full status (read), bit n = channel n
//   02 hi  interrupt status (read only), bit 8+n = channel n
//   02 lo  interrupt vector (read/write)
//   04 hi  calibration access: D15 = 1 read / 0 write, D14..D8 = byte address
//   04 lo  calibration write data
//   06 hi  calibration read data (read only)
//   06 lo  D1 = write busy, D0 = read complete (read only)
//   08+6n  hi timer prescaler n, lo control & status n
//            (D6..5 irq threshold, D4 irq enable, D3 external I/O,
//             D2..1 mode, D0 FIFO empty, read only)
//   0A+6n  conversion timer n
//   0C+6n  FIFO port n (16-bit write pushes one sample; reads 0)
// A separate ID-space strobe reads the identification memory, one byte per
// word in D7..D0 at byte address addr[5:1].
// Bit positions inside the calibration status byte, the read/write polarity,
// the 16-bit-only FIFO port and the bus timing are this design's choices.
//
// Bus timing: sel (or id_sel) is a one-clock strobe with we, addr, be and
// wdata valid; writes take effect on that edge and ack with rdata follows one
// clock later. A calibration command is executed when the high byte of 04 is
// written (put the write data in the low byte first or in the same access);
// a read sets "read complete" one clock later, a write finishes in the same
// clock, so "write busy" is never seen set. A channel's software reset returns
// its configuration to the reset values (prescaler 80, timer 1, all control
// bits 0) and is held while the channel's FIFO reset is in progress.
module host_regmap
  import dac_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // host bus
  input  logic                sel,
  input  logic                id_sel,
  input  logic                we,
  input  logic [7:1]          addr,
  input  logic [1:0]          be,        // be[1]: D15..D8 (even byte), be[0]: D7..D0
  input  logic [15:0]         wdata,
  output logic [15:0]         rdata,
  output logic                ack,
  // channels
  output ch_cfg_t             cfg          [NUM_CH],
  output logic [NUM_CH-1:0]   ch_rst_req,
  input  logic [NUM_CH-1:0]   ch_rst_active,
  output logic [NUM_CH-1:0]   start,
  output logic [NUM_CH-1:0]   fifo_wen,
  output logic [15:0]         fifo_wdata,
  input  logic [NUM_CH-1:0]   fifo_full,
  input  logic [NUM_CH-1:0]   fifo_empty,
  input  logic [NUM_CH-1:0]   irq_status,
  output logic [7:0]          irq_vector,
  // calibration memory
  output logic                cal_we,
  output logic                cal_re,
  output logic [6:0]          cal_addr,
  output logic [7:0]          cal_wdata,
  input  logic [7:0]          cal_rdata,
  // identification memory
  output logic [4:0]          id_addr,
  input  logic [7:0]          id_data
);
  logic [7:0]  byte_addr;
  logic        wr, rd;
  logic        cal_rw;       // 1 = read
  logic        rd_comp;
  logic        wr_busy;
  logic [2:0]  ch_word [NUM_CH];  // one-hot: control word, timer, FIFO port

  assign byte_addr = {addr, 1'b0};
  assign wr        = sel && we;
  assign rd        = sel && !we;
  assign id_addr   = addr[5:1];

  // channel block decode
  always_comb begin
    for (int n = 0; n < int'(NUM_CH); n++) begin
      ch_word[n] = '0;
      for (int w = 0; w < 3; w++) begin
        if (byte_addr == 8'(int'(REG_CH_BASE) + int'(REG_CH_STRIDE) * n + 2 * w)) begin
          ch_word[n][w] = 1'b1;
        end
      end
    end
  end

  // control, calibration and channel registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < int'(NUM_CH); n++) cfg[n] <= CH_CFG_RESET;
      ch_rst_req <= '0;
      start      <= '0;
      irq_vector <= '0;
      cal_rw     <= 1'b0;
      cal_addr   <= '0;
      cal_wdata  <= '0;
      cal_we     <= 1'b0;
      cal_re     <= 1'b0;
      rd_comp    <= 1'b0;
      wr_busy    <= 1'b0;
    end else begin
      ch_rst_req <= '0;
      start      <= '0;
      cal_we     <= 1'b0;
      cal_re     <= 1'b0;
      wr_busy    <= 1'b0;
      if (cal_re) rd_comp <= 1'b1;

      if (wr) begin
        if (byte_addr == REG_RESET_START) begin
          if (be[1]) ch_rst_req <= wdata[15:8];
          if (be[0]) start      <= wdata[7:0];
        end
        if (byte_addr == REG_IRQ && be[0]) irq_vector <= wdata[7:0];
        if (byte_addr == REG_CAL_CMD) begin
          if (be[0]) cal_wdata <= wdata[7:0];
          if (be[1]) begin
            cal_rw   <= wdata[15];
            cal_addr <= wdata[14:8];
            rd_comp  <= 1'b0;
            if (wdata[15]) cal_re <= 1'b1;
            else begin
              cal_we  <= 1'b1;
              wr_busy <= 1'b1;
            end
          end
        end
        for (int n = 0; n < int'(NUM_CH); n++) begin
          if (ch_word[n][0]) begin
            if (be[1]) cfg[n].prescaler <= wdata[15:8];
            if (be[0]) begin
              cfg[n].irq_thr <= irq_thr_e'(wdata[6:5]);
              cfg[n].irq_en  <= wdata[4];
              cfg[n].ext_out <= wdata[3];
              cfg[n].mode    <= mode_e'(wdata[2:1]);
            end
          end
          if (ch_word[n][1]) begin
            if (be[1]) cfg[n].timer[15:8] <= wdata[15:8];
            if (be[0]) cfg[n].timer[7:0]  <= wdata[7:0];
          end
        end
      end

      // software reset of a channel clears its configuration
      for (int n = 0; n < int'(NUM_CH); n++)
        if (ch_rst_active[n] || ch_rst_req[n]) cfg[n] <= CH_CFG_RESET;
    end
  end

  // FIFO port writes go straight to the channel FIFO on the strobe.
  always_comb begin
    fifo_wdata = wdata;
    for (int n = 0; n < int'(NUM_CH); n++)
      fifo_wen[n] = wr && be == 2'b11 && ch_word[n][2] && !ch_rst_active[n];
  end

  // read data, registered with ack
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rdata <= '0;
      ack   <= 1'b0;
    end else begin
      ack <= sel || id_sel;
      if (id_sel) begin
        rdata <= {8'h00, id_data};
      end else if (rd) begin
        rdata <= '0;
        unique case (byte_addr)
          REG_RESET_START: rdata <= {8'h00, fifo_full};
          REG_IRQ:         rdata <= {irq_status, irq_vector};
          REG_CAL_CMD:     rdata <= {cal_rw, cal_addr, cal_wdata};
          REG_CAL_STAT:    rdata <= {cal_rdata, 6'b0, wr_busy, rd_comp};
          default: begin
            for (int n = 0; n < int'(NUM_CH); n++) begin
              if (ch_word[n][0])
                rdata <= {cfg[n].prescaler, 1'b0, cfg[n].irq_thr, cfg[n].irq_en,
                          cfg[n].ext_out, cfg[n].mode, fifo_empty[n]};
              if (ch_word[n][1])
                rdata <= cfg[n].timer;
            end
          end
        endcase
      end
    end
  end

  // Host bus rules: an access is a single strobe, never to both spaces at once.
  a_one_space: assert property (@(posedge clk) disable iff (!rst_n) !(sel && id_sel));
  a_ack_follows_strobe: assert property (@(posedge clk) disable iff (!rst_n) (sel || id_sel) |=> ack);

endmodule
