// tb_channel_ctrl: self-checking test of the channel output sequencer.
//
// The FIFO, timer, calibrator and SPI link around the sequencer are modelled
// here: a sample counter stands for the FIFO, ticks are driven by hand and a
// 33-clock busy window after each calibrated word stands for the SPI frame.
// Checks per mode: off ignores Start Convert; single converts exactly one
// sample on the first tick and disarms; continuous converts one sample per
// tick; a tick with an empty FIFO is an underrun and one during a transfer an
// overrun, neither pops; external trigger input converts on each rising edge
// of the trigger and keeps the timer stopped; external trigger output converts
// on ticks and pulses trig_out; every pop is followed one clock later by
// cal_valid; Start Convert clears the timer.
module tb_channel_ctrl;
  import dac_pkg::*;
  logic clk = 0;
  logic rst_n = 0;
  mode_e mode = MODE_OFF;
  logic ext_out = 0, start = 0, trig_in = 0, tick = 0;
  logic fifo_empty, spi_busy, cal_busy;
  logic timer_en, timer_clear, ren, cal_valid, trig_out, underrun, overrun, running;
  int checks = 0, failures = 0;
  int level = 0;       // samples in the modelled FIFO
  int pops = 0, cvs = 0, trigouts = 0, unders = 0, overs = 0;
  int spi_left = 0;
  logic cal_q = 0;

  always #5 clk = ~clk;

  channel_ctrl dut (.*);

  assign fifo_empty = (level == 0);
  assign spi_busy   = (spi_left > 0);
  assign cal_busy   = cal_q;

  // environment model: FIFO level, calibrator stage, SPI busy window
  always @(posedge clk) if (rst_n) begin
    if (ren) begin
      level <= level - 1;
      pops++;
    end
    if (cal_valid) cvs++;
    if (trig_out) trigouts++;
    if (underrun) unders++;
    if (overrun) overs++;
    cal_q <= cal_valid;
    if (cal_q) spi_left <= 33;
    else if (spi_left > 0) spi_left <= spi_left - 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic cyc(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic pulse_start();
    start = 1;
    @(negedge clk);
    start = 0;
    #1 check(timer_clear == 0, "timer_clear only with start");
  endtask

  task automatic pulse_tick();
    tick = 1;
    @(negedge clk);
    tick = 0;
  endtask

  task automatic do_reset();
    rst_n = 0;
    cyc(2);
    rst_n = 1;
    cyc(40);
  endtask

  initial begin
    int p0;
    cyc(3);
    rst_n = 1;
    level = 10;
    // off: start is ignored
    mode = MODE_OFF;
    start = 1;
    #1 check(timer_clear, "start clears the timer");
    @(negedge clk);
    start = 0;
    check(!running, "off mode does not arm");
    pulse_tick();
    cyc(3);
    check(pops == 0, "no pop in off mode");
    // single
    mode = MODE_SINGLE;
    pulse_start();
    check(running && timer_en, "single mode armed, timer running");
    cyc(5);
    check(pops == 0, "no pop before tick");
    pulse_tick();
    cyc(2);
    check(pops == 1 && cvs == 1, "single converts one sample");
    check(!running, "single disarms");
    cyc(40);
    pulse_tick();
    cyc(3);
    check(pops == 1, "single ignores later ticks");
    // continuous
    mode = MODE_CONT;
    pulse_start();
    p0 = pops;
    for (int i = 0; i < 5; i++) begin
      pulse_tick();
      cyc(52);
    end
    check(pops == p0 + 5, $sformatf("continuous: %0d pops for 5 ticks", pops - p0));
    check(running, "continuous stays armed");
    // overrun: tick during a transfer
    p0 = pops;
    pulse_tick();
    cyc(5);
    pulse_tick();
    cyc(2);
    check(pops == p0 + 1, "tick during transfer does not pop");
    check(overs == 1, $sformatf("overrun counted (%0d)", overs));
    cyc(50);
    // underrun: empty FIFO
    level = 0;
    pulse_tick();
    cyc(2);
    check(unders == 1, "underrun counted");
    check(pops == p0 + 1, "no pop when empty");
    level = 10;
    // external trigger input
    do_reset();
    mode = MODE_EXT; ext_out = 0;
    pulse_start();
    check(!timer_en, "timer stopped with trigger input");
    p0 = pops;
    pulse_tick();
    cyc(2);
    check(pops == p0, "ticks ignored with trigger input");
    for (int i = 0; i < 3; i++) begin
      trig_in = 1;
      cyc(5);
      trig_in = 0;
      cyc(50);
    end
    check(pops == p0 + 3, $sformatf("three trigger edges, %0d pops", pops - p0));
    check(trigouts == 0, "no trig_out with trigger input");
    // external trigger output
    do_reset();
    mode = MODE_EXT; ext_out = 1;
    pulse_start();
    check(timer_en, "timer runs with trigger output");
    p0 = pops;
    for (int i = 0; i < 4; i++) begin
      pulse_tick();
      cyc(52);
    end
    check(pops == p0 + 4 && trigouts == 4, $sformatf("trigger output: %0d pops %0d pulses", pops - p0, trigouts));
    // mode off while running stops the channel
    mode = MODE_OFF;
    cyc(2);
    check(!running, "off stops the channel");
    check(cvs == pops, "every pop followed by cal_valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
