// dac_board_top: FPGA of an eight-channel analog voltage output board.
//
// A host CPU fills per-channel sample FIFOs over a 16-bit bus; the FPGA plays
// each channel's samples out to its own 16-bit DAC at a rate set per channel,
// correcting every sample with that channel's gain and offset coefficients
// on the way. Because the timing comes from counters in the FPGA rather than
// from the host, the output stays evenly paced however the host's writes
// arrive, and a channel interrupts the host when its FIFO runs low.
//
// Two clock domains: clk_bus (host bus, register map, FIFO write side,
// interrupt logic) and clk_conv (8 MHz conversion clock: timers, sequencers,
// calibration, SPI). They meet only in the asynchronous FIFOs, in the
// synchronizers for Start Convert and the software reset, and in the
// configuration and coefficient values, which the host must not change
// while the affected channel converts.
//
// Interface: host bus as in host_regmap (one-clock sel/id_sel strobe, ack and
// rdata one clock later); irq_n is low while any channel's interrupt status
// bit is set, irq_vector is the interrupt vector register; range_unipolar
// selects per channel the 0..10 V range (else -5..+5 V), as strapped on the
// board; per channel the trigger pin (in, out, output enable) and the DAC
// link (SCLK, SDI, CS, LDAC). underrun/overrun are one-clock conversion-domain
// event flags for diagnostics. rst_n is asynchronous, active low, released
// in each domain through a synchronizer.
module dac_board_top
  import dac_pkg::*;
#(
  parameter int unsigned DEPTH    = FIFO_DEPTH,
  parameter int unsigned SPI_HALF = 1
) (
  input  logic                clk_bus,
  input  logic                clk_conv,
  input  logic                rst_n,
  // host bus
  input  logic                sel,
  input  logic                id_sel,
  input  logic                we,
  input  logic [7:1]          addr,
  input  logic [1:0]          be,
  input  logic [15:0]         wdata,
  output logic [15:0]         rdata,
  output logic                ack,
  output logic                irq_n,
  output logic [7:0]          irq_vector,
  // board straps and per-channel pins
  input  logic [NUM_CH-1:0]   range_unipolar,
  input  logic [NUM_CH-1:0]   trig_in,
  output logic [NUM_CH-1:0]   trig_out,
  output logic [NUM_CH-1:0]   trig_oe,
  output logic [NUM_CH-1:0]   dac_sclk,
  output logic [NUM_CH-1:0]   dac_sdi,
  output logic [NUM_CH-1:0]   dac_cs_n,
  output logic [NUM_CH-1:0]   dac_ldac_n,
  output logic [NUM_CH-1:0]   underrun,
  output logic [NUM_CH-1:0]   overrun
);
  localparam int unsigned CW = $clog2(DEPTH) + 1;

  logic                rst_bus_n, rst_conv_n;
  ch_cfg_t             cfg [NUM_CH];
  logic [NUM_CH-1:0]   ch_rst_req, ch_rst_bus, ch_rst_conv;
  logic [NUM_CH-1:0]   start_bus, start_conv;
  logic [NUM_CH-1:0]   fifo_wen, fifo_full, fifo_empty, irq_status;
  logic [15:0]         fifo_wdata;
  logic [CW-1:0]       fifo_count [NUM_CH];
  logic                cal_we, cal_re;
  logic [6:0]          cal_addr;
  logic [7:0]          cal_wdata, cal_rdata;
  logic [7:0]          coef [2*NUM_CH];
  logic [4:0]          id_addr;
  logic [7:0]          id_data;

  rst_sync u_rst_bus  (.clk(clk_bus),  .arst_n(rst_n), .rst_n(rst_bus_n));
  rst_sync u_rst_conv (.clk(clk_conv), .arst_n(rst_n), .rst_n(rst_conv_n));

  host_regmap u_regmap (
    .clk(clk_bus), .rst_n(rst_bus_n),
    .sel(sel), .id_sel(id_sel), .we(we), .addr(addr), .be(be), .wdata(wdata),
    .rdata(rdata), .ack(ack),
    .cfg(cfg), .ch_rst_req(ch_rst_req), .ch_rst_active(ch_rst_bus), .start(start_bus),
    .fifo_wen(fifo_wen), .fifo_wdata(fifo_wdata), .fifo_full(fifo_full),
    .fifo_empty(fifo_empty), .irq_status(irq_status), .irq_vector(irq_vector),
    .cal_we(cal_we), .cal_re(cal_re), .cal_addr(cal_addr), .cal_wdata(cal_wdata),
    .cal_rdata(cal_rdata), .id_addr(id_addr), .id_data(id_data)
  );

  id_rom u_id (.addr(id_addr), .data(id_data));

  cal_coeff_ram #(.DEPTH(2 * NUM_CH)) u_cal_ram (
    .clk(clk_bus), .rst_n(rst_bus_n), .we(cal_we), .re(cal_re), .addr(cal_addr),
    .wdata(cal_wdata), .rdata(cal_rdata), .coef(coef)
  );

  for (genvar n = 0; n < NUM_CH; n++) begin : g_ch
    rst_handshake u_swrst (
      .clk_a(clk_bus), .rst_a_n(rst_bus_n), .req(ch_rst_req[n]), .rst_a(ch_rst_bus[n]),
      .clk_b(clk_conv), .rst_b_n(rst_conv_n), .rst_b(ch_rst_conv[n])
    );

    pulse_sync u_start (
      .clk_a(clk_bus), .rst_a_n(rst_bus_n), .src_pulse(start_bus[n]),
      .clk_b(clk_conv), .rst_b_n(rst_conv_n), .dst_pulse(start_conv[n])
    );

    irq_gen u_irq (
      .clk(clk_bus), .rst_n(rst_bus_n && !ch_rst_bus[n]),
      .irq_en(cfg[n].irq_en), .irq_thr(cfg[n].irq_thr), .count(fifo_count[n]),
      .irq(irq_status[n])
    );

    dac_channel #(.DEPTH(DEPTH), .SPI_HALF(SPI_HALF)) u_ch (
      .clk_bus(clk_bus), .rst_bus_n(rst_bus_n && !ch_rst_bus[n]),
      .fifo_wen(fifo_wen[n]), .fifo_wdata(fifo_wdata),
      .fifo_full(fifo_full[n]), .fifo_empty(fifo_empty[n]), .fifo_count(fifo_count[n]),
      .clk_conv(clk_conv), .rst_conv_n(rst_conv_n && !ch_rst_conv[n]),
      .cfg(cfg[n]), .start(start_conv[n]),
      .gain_err(coef[2*n+1]), .off_err(coef[2*n]), .unipolar(range_unipolar[n]),
      .trig_in(trig_in[n]), .trig_out(trig_out[n]), .trig_oe(trig_oe[n]),
      .dac_sclk(dac_sclk[n]), .dac_sdi(dac_sdi[n]), .dac_cs_n(dac_cs_n[n]),
      .dac_ldac_n(dac_ldac_n[n]), .underrun(underrun[n]), .overrun(overrun[n])
    );
  end

  assign irq_n = ~|irq_status;

endmodule
