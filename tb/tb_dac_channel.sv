// tb_dac_channel: self-checking test of one complete output channel.
//
// Bus clock 30 ns, conversion clock 125 ns (8 MHz), DAC modelled by
// dac7731_model. Checks: the FIFO takes exactly 128 samples and flags full;
// continuous mode at prescaler 53, timer 1 plays the samples out in order,
// each corrected by Data*(1+g/262144)+o/4 (+32768 when unipolar), one DAC
// frame every 53 conversion clocks (6.625 us) with the first frame no sooner
// than one period after Start Convert; the channel empties and reports
// underruns; single mode sends exactly one sample per Start Convert; a slower
// rate (prescaler 80, timer 3 = 30 us) is checked as well.
module tb_dac_channel;
  import dac_pkg::*;
  logic clk_bus = 0, clk_conv = 0;
  logic rst_bus_n = 0, rst_conv_n = 0;
  logic fifo_wen = 0;
  logic [15:0] fifo_wdata = 0;
  logic fifo_full, fifo_empty;
  logic [7:0] fifo_count;
  ch_cfg_t cfg = CH_CFG_RESET;
  logic start = 0;
  logic [7:0] gain_err = 0, off_err = 0;
  logic unipolar = 0, trig_in = 0;
  logic trig_out, trig_oe, dac_sclk, dac_sdi, dac_cs_n, dac_ldac_n, underrun, overrun;
  int checks = 0, failures = 0;
  logic [15:0] expq [$];
  time t_start;
  int frames = 0, unders = 0;
  int period_clk = 53;

  always #15 clk_bus = ~clk_bus;
  always #62.5 clk_conv = ~clk_conv;

  dac_channel dut (.*);
  dac7731_model u_dac (.sclk(dac_sclk), .sdi(dac_sdi), .cs_n(dac_cs_n), .ldac_n(dac_ldac_n));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [15:0] corrected(logic [15:0] d, logic [7:0] g, logic [7:0] o, bit uni);
    real r;
    longint v;
    r = $floor(real'(int'(signed'(d))) * real'(int'(signed'(g))) / 262144.0 + 0.5)
      + $floor(real'(int'(signed'(o))) / 4.0 + 0.5);
    v = longint'(int'(signed'(d))) + longint'(r) + (uni ? 32768 : 0);
    if (uni) v = (v < 0) ? 0 : (v > 65535) ? 65535 : v;
    else     v = (v < -32768) ? -32768 : (v > 32767) ? 32767 : v;
    return 16'(v);
  endfunction

  // each completed frame is checked against the expected queue and the period
  always @(posedge dac_ldac_n) if (rst_conv_n) begin
    frames++;
    if (expq.size() == 0) begin
      checks++; failures++;
      $display("FAIL: unexpected DAC frame %h", u_dac.code);
    end else begin
      logic [15:0] e;
      e = expq.pop_front();
      check(u_dac.code == e, $sformatf("DAC code %h expected %h", u_dac.code, e));
    end
    if (frames == 1)
      check(u_dac.t_cs_fall - t_start >= time'(period_clk) * 125,
            $sformatf("first frame %0t after start", u_dac.t_cs_fall - t_start));
    else
      check(u_dac.t_cs_fall - u_dac.t_cs_fall_prev == time'(period_clk) * 125,
            $sformatf("frame interval %0t expected %0d clocks", u_dac.t_cs_fall - u_dac.t_cs_fall_prev, period_clk));
  end

  always @(posedge clk_conv) if (rst_conv_n && underrun) unders++;

  task automatic push(input logic [15:0] d);
    @(negedge clk_bus);
    fifo_wen = 1; fifo_wdata = d;
    @(negedge clk_bus);
    fifo_wen = 0;
  endtask

  task automatic start_convert();
    @(negedge clk_conv);
    start = 1;
    t_start = $time;
    @(negedge clk_conv);
    start = 0;
    frames = 0;
  endtask

  task automatic chan_reset();
    @(negedge clk_conv);
    rst_bus_n = 0; rst_conv_n = 0;
    repeat (3) @(negedge clk_conv);
    rst_bus_n = 1; rst_conv_n = 1;
    repeat (3) @(negedge clk_conv);
  endtask

  initial begin
    logic [15:0] d;
    chan_reset();
    // fill: 130 writes, 128 accepted
    for (int i = 0; i < 130; i++) begin
      d = 16'($urandom);
      if (i < 128) expq.push_back(d);
      push(d);
    end
    check(fifo_full && fifo_count == 128, $sformatf("full after 130 writes, count %0d", fifo_count));
    // continuous at the fastest rate, bipolar, with correction
    gain_err = 8'd77; off_err = -8'sd9; unipolar = 0;
    foreach (expq[i]) expq[i] = corrected(expq[i], gain_err, off_err, 0);
    cfg.mode = MODE_CONT; cfg.prescaler = 8'd53; cfg.timer = 16'd1; period_clk = 53;
    repeat (4) @(negedge clk_conv);
    start_convert();
    repeat (130 * 53) @(negedge clk_conv);
    check(frames == 128, $sformatf("continuous frames %0d", frames));
    check(expq.size() == 0, "all samples played");
    check(unders > 0, "underrun reported once the FIFO ran dry");
    repeat (4) @(negedge clk_bus);
    check(fifo_empty && !fifo_full, "FIFO empty after playout");
    // unipolar, slower rate
    chan_reset();
    gain_err = -8'sd100; off_err = 8'd50; unipolar = 1;
    cfg.prescaler = 8'd80; cfg.timer = 16'd3; period_clk = 240;
    for (int i = 0; i < 10; i++) begin
      d = 16'($urandom);
      expq.push_back(corrected(d, gain_err, off_err, 1));
      push(d);
    end
    repeat (4) @(negedge clk_conv);
    start_convert();
    repeat (12 * 240) @(negedge clk_conv);
    check(frames == 10, $sformatf("unipolar frames %0d", frames));
    // single mode: one sample per Start Convert
    chan_reset();
    cfg.mode = MODE_SINGLE; cfg.prescaler = 8'd80; cfg.timer = 16'd1; period_clk = 80;
    for (int i = 0; i < 3; i++) push(16'(i * 1000));
    repeat (4) @(negedge clk_conv);
    expq.push_back(corrected(16'd0, gain_err, off_err, 1));
    start_convert();
    repeat (400) @(negedge clk_conv);
    check(frames == 1, $sformatf("single mode frames %0d", frames));
    expq.push_back(corrected(16'd1000, gain_err, off_err, 1));
    start_convert();
    repeat (400) @(negedge clk_conv);
    check(frames == 1, $sformatf("second single frames %0d", frames));
    check(fifo_count == 1, $sformatf("one sample left (%0d)", fifo_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk_conv);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
