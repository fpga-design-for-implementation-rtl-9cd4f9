// tb_dac_board_top: end-to-end test of the eight-channel analog output board
// at its default size (8 channels, 128-sample FIFOs), driven like a host CPU.
//
// Bus clock 30 ns, conversion clock 125 ns (8 MHz); each channel's DAC is a
// dac7731_model. The host reads the ID memory, loads distinct gain/offset
// coefficients for every channel through the calibration access registers and
// reads them back, and sets the channels up as follows:
//   ch0, ch1  continuous, 10 us per sample (prescaler 80, timer 1), the same
//             300-sample sine wave on both; interrupt at fewer than 64
//             samples, on which the host writes 64 more (interrupt-driven refill)
//   ch2       single mode, two Start Converts, two samples out
//   ch3       external trigger input, three trigger pulses
//   ch4       external trigger output, prescaler 53 x timer 2, five pulses out
//   ch5       unipolar range, continuous at 6.625 us, includes saturating data
//   ch6       filled past full (full status, dropped writes), software reset,
//             then converts at a too-short period (prescaler 10) so ticks
//             overrun the SPI transfer
//   ch7       continuous with two samples: runs dry (underrun)
// Every DAC frame is compared with the corrected sample the host wrote, in
// order; continuous channels are checked for the exact frame period and the
// first frame for the delay after Start Convert. Each mechanism is counted and
// one that never happened counts as a failure.
module tb_dac_board_top;
  import dac_pkg::*;
  logic clk_bus = 0, clk_conv = 0, rst_n = 1;

  initial #1 rst_n = 0;   // an edge, so the reset synchronizers clear at once
  logic sel = 0, id_sel = 0, we = 0;
  logic [7:1] addr = 0;
  logic [1:0] be = 0;
  logic [15:0] wdata = 0, rdata;
  logic ack, irq_n;
  logic [7:0] irq_vector;
  logic [7:0] range_unipolar = 8'b0010_0000;
  logic [7:0] trig_in = 0, trig_out, trig_oe, dac_sclk, dac_sdi, dac_cs_n, dac_ldac_n, underrun, overrun;
  int checks = 0, failures = 0;

  always #15 clk_bus = ~clk_bus;
  always #62.5 clk_conv = ~clk_conv;

  dac_board_top dut (.*);

  // expected corrected codes per channel and per-channel bookkeeping
  logic [15:0] expq [8][$];
  logic [7:0]  gain [8], offs [8];
  int          period [8];          // expected frame period in conversion clocks, 0 = not checked
  int          frames [8];
  time         t_start [8];
  int          n_underrun = 0, n_overrun = 0, n_trig_out = 0, n_irq = 0, n_full = 0;
  int          n_swreset = 0, n_sat = 0, n_calrd = 0, n_first_delay = 0;
  int          same_data_checks = 0;
  logic [15:0] last_code [8];

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

  for (genvar n = 0; n < 8; n++) begin : g_dac
    dac7731_model u_dac (.sclk(dac_sclk[n]), .sdi(dac_sdi[n]), .cs_n(dac_cs_n[n]), .ldac_n(dac_ldac_n[n]));

    always @(posedge dac_ldac_n[n]) if (rst_n) begin
      frames[n]++;
      last_code[n] = u_dac.code;
      if (expq[n].size() == 0) begin
        checks++; failures++;
        $display("FAIL: ch%0d unexpected frame %h", n, u_dac.code);
      end else begin
        logic [15:0] e;
        e = expq[n].pop_front();
        check(u_dac.code == e, $sformatf("ch%0d code %h expected %h", n, u_dac.code, e));
        if (e == 16'hFFFF && n == 5) n_sat++;
      end
      if (period[n] != 0) begin
        if (frames[n] == 1) begin
          check(u_dac.t_cs_fall - t_start[n] >= time'(period[n]) * 125,
                $sformatf("ch%0d first frame too early", n));
          n_first_delay++;
        end else begin
          check(u_dac.t_cs_fall - u_dac.t_cs_fall_prev == time'(period[n]) * 125,
                $sformatf("ch%0d frame interval %0t", n, u_dac.t_cs_fall - u_dac.t_cs_fall_prev));
        end
      end
      check(u_dac.bad_frames == 0, $sformatf("ch%0d malformed frame", n));
    end
  end

  always @(posedge clk_conv) if (rst_n) begin
    n_underrun += $countones(underrun);
    n_overrun  += $countones(overrun);
    n_trig_out += $countones(trig_out & trig_oe);
  end

  // host bus accesses
  task automatic bus(input bit is_id, input bit w, input logic [7:0] a, input logic [1:0] b,
                     input logic [15:0] d, output logic [15:0] q);
    @(negedge clk_bus);
    sel = !is_id; id_sel = is_id; we = w; addr = a[7:1]; be = b; wdata = d;
    @(negedge clk_bus);
    sel = 0; id_sel = 0; we = 0;
    check(ack, "bus ack");
    q = rdata;
  endtask

  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    logic [15:0] q;
    bus(0, 1, a, 2'b11, d, q);
  endtask

  task automatic rd(input logic [7:0] a, output logic [15:0] q);
    bus(0, 0, a, 2'b11, 16'h0, q);
  endtask

  function automatic logic [7:0] ch_base(int n);
    return 8'(8 + 6 * n);
  endfunction

  function automatic logic [7:0] csr(mode_e m, bit ext, bit ien, irq_thr_e thr);
    return {1'b0, thr, ien, ext, m, 1'b0};
  endfunction

  // write one sample to channel n and remember its corrected value
  task automatic put(int n, logic [15:0] d, bit expect_out = 1);
    wr(ch_base(n) + 4, d);
    if (expect_out) expq[n].push_back(corrected(d, gain[n], offs[n], range_unipolar[n]));
  endtask

  function automatic logic [15:0] sine(int i);
    return 16'(int'($floor(20000.0 * $sin(2.0 * 3.14159265358979 * real'(i) / 50.0) + 0.5)));
  endfunction

  int sine_written = 0;
  localparam int SINE_LEN = 300;

  initial begin
    logic [15:0] q;
    foreach (frames[n]) begin
      frames[n] = 0; period[n] = 0; t_start[n] = 0;
    end
    repeat (4) @(negedge clk_conv);
    rst_n = 1;
    repeat (4) @(negedge clk_conv);

    // identification memory
    for (int i = 0; i < 4; i++) begin
      bus(1, 0, 8'(2 * i + 1), 2'b01, 16'h0, q);
      check(q[7:0] == 8'(32'("IPAC") >> (8 * (3 - i))), $sformatf("ID byte %0d", i));
    end

    // calibration coefficients; ch0 and ch1 share theirs (same waveform)
    for (int n = 0; n < 8; n++) begin
      gain[n] = 8'($urandom_range(0, 255));
      offs[n] = 8'($urandom_range(0, 255));
    end
    gain[1] = gain[0]; offs[1] = offs[0];
    gain[5] = 8'd120; offs[5] = 8'd40;   // makes the last ch5 sample saturate
    for (int n = 0; n < 8; n++) begin
      wr(8'h04, {1'b0, 7'(2 * n), offs[n]});
      wr(8'h04, {1'b0, 7'(2 * n + 1), gain[n]});
    end
    for (int n = 0; n < 8; n++) begin
      wr(8'h04, {1'b1, 7'(2 * n + 1), 8'h00});
      rd(8'h06, q);
      check(q == {gain[n], 8'h01}, $sformatf("calibration read-back ch%0d %h", n, q));
      if (q[0]) n_calrd++;
    end

    // ch6: overfill, check full, software reset
    for (int i = 0; i < 130; i++) put(6, 16'(i), 0);
    rd(8'h00, q);
    check(q[6] == 1'b1, "ch6 FIFO full status");
    if (q[6]) n_full++;
    wr(ch_base(6), {8'd60, csr(MODE_CONT, 0, 1, THR_16)});
    wr(8'h00, 16'h4000);                       // software reset of channel 6
    repeat (20) @(negedge clk_bus);
    rd(8'h00, q);
    check(q[6] == 1'b0, "ch6 full cleared by software reset");
    rd(ch_base(6), q);
    check(q == 16'h5001, $sformatf("ch6 registers back to reset values, empty (%h)", q));
    if (q == 16'h5001) n_swreset++;

    // channel setup
    wr(ch_base(0), {8'd80, csr(MODE_CONT, 0, 1, THR_64)}); wr(ch_base(0) + 2, 16'd1); period[0] = 80;
    wr(ch_base(1), {8'd80, csr(MODE_CONT, 0, 1, THR_64)}); wr(ch_base(1) + 2, 16'd1); period[1] = 80;
    wr(ch_base(2), {8'd80, csr(MODE_SINGLE, 0, 0, THR_NONE)});
    wr(ch_base(3), {8'd80, csr(MODE_EXT, 0, 0, THR_NONE)});
    wr(ch_base(4), {8'd53, csr(MODE_EXT, 1, 0, THR_NONE)}); wr(ch_base(4) + 2, 16'd2); period[4] = 106;
    wr(ch_base(5), {8'd53, csr(MODE_CONT, 0, 0, THR_NONE)}); period[5] = 53;
    wr(ch_base(6), {8'd10, csr(MODE_CONT, 0, 0, THR_NONE)});
    wr(ch_base(7), {8'd80, csr(MODE_CONT, 0, 0, THR_NONE)}); period[7] = 80;
    rd(8'h02, q);
    check(q[15:8] == 8'h03, $sformatf("ch0/ch1 request data while empty (%h)", q));
    wr(8'h02, 16'h00B4);                      // interrupt vector
    check(irq_vector == 8'hB4, "interrupt vector");

    // samples
    for (int i = 0; i < 128; i++) begin
      put(0, sine(i));
      put(1, sine(i));
    end
    sine_written = 128;
    rd(8'h00, q);
    check(q[1:0] == 2'b11, "ch0/ch1 full after 128 samples");
    check(irq_n, "no interrupt while FIFOs are full");
    for (int i = 0; i < 2; i++) put(2, 16'(1000 * (i + 1)));
    for (int i = 0; i < 3; i++) put(3, 16'(-3000 * (i + 1)));
    for (int i = 0; i < 5; i++) put(4, 16'($urandom));
    for (int i = 0; i < 19; i++) put(5, 16'(i * 3000 - 20000));
    put(5, 16'h7FFF);                          // saturates at the top of the unipolar range
    for (int i = 0; i < 5; i++) put(6, 16'($urandom));
    for (int i = 0; i < 2; i++) put(7, 16'(i + 7));

    // start all channels together
    @(negedge clk_bus);
    foreach (t_start[n]) t_start[n] = $time;
    wr(8'h00, 16'h00FF);

    fork
      // external trigger pulses for ch3
      begin
        repeat (3) begin
          repeat (300) @(negedge clk_conv);
          trig_in[3] = 1;
          repeat (4) @(negedge clk_conv);
          trig_in[3] = 0;
        end
      end
      // the host: second Start Convert for ch2, then interrupt-driven refill
      begin
        repeat (500) @(negedge clk_conv);
        wr(8'h00, 16'h0004);
        while (sine_written < SINE_LEN) begin
          @(negedge clk_bus);
          if (!irq_n) begin
            rd(8'h02, q);
            check(q[9:8] != 0, "interrupt from ch0/ch1");
            n_irq++;
            for (int i = 0; i < 64 && sine_written < SINE_LEN; i++) begin
              put(0, sine(sine_written));
              put(1, sine(sine_written));
              sine_written++;
            end
            repeat (10) @(negedge clk_bus);
          end
        end
        // all data given: no more requests from ch0/ch1
        wr(ch_base(0), {8'd80, csr(MODE_CONT, 0, 0, THR_64)});
        wr(ch_base(1), {8'd80, csr(MODE_CONT, 0, 0, THR_64)});
      end
    join

    // let every channel drain
    repeat (140 * 80) @(negedge clk_conv);
    for (int n = 0; n < 8; n++)
      check(expq[n].size() == 0, $sformatf("ch%0d left %0d samples unplayed", n, expq[n].size()));
    check(frames[0] == SINE_LEN && frames[1] == SINE_LEN, $sformatf("sine frames %0d %0d", frames[0], frames[1]));
    check(frames[2] == 2, $sformatf("single-mode frames %0d", frames[2]));
    check(frames[3] == 3, $sformatf("trigger-input frames %0d", frames[3]));
    check(frames[4] == 5, $sformatf("trigger-output frames %0d", frames[4]));
    check(last_code[0] == last_code[1], "ch0 and ch1 end on the same code");
    rd(ch_base(0), q);
    check(q[0] == 1'b1, "ch0 reports empty");

    // every mechanism must have happened
    check(n_full > 0, "mechanism: FIFO full");
    check(n_swreset > 0, "mechanism: software reset");
    check(n_calrd > 0, "mechanism: calibration read");
    check(n_irq >= 2, $sformatf("mechanism: interrupt refill (%0d)", n_irq));
    check(n_underrun > 0, "mechanism: underrun");
    check(n_overrun > 0, "mechanism: overrun");
    check(n_trig_out == 5, $sformatf("mechanism: trigger output pulses (%0d)", n_trig_out));
    check(n_sat > 0, "mechanism: saturation");
    check(n_first_delay >= 4, "mechanism: first-conversion delay");
    $display("mechanisms: full=%0d swreset=%0d calread=%0d irq=%0d underrun=%0d overrun=%0d trigout=%0d sat=%0d",
             n_full, n_swreset, n_calrd, n_irq, n_underrun, n_overrun, n_trig_out, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk_conv);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
