// tb_host_regmap: self-checking test of the host bus slave and register map.
//
// The calibration memory and ID memory are the real blocks; FIFO flags,
// interrupt status and the software-reset handshake are driven by the test.
// Checks: reset values (prescaler 80, timer 1, control 0) of all eight
// channel blocks at 08+6n; 16-bit and single-byte writes and read-back of the
// prescaler, control and timer registers; mode, threshold and enable fields in
// the cfg outputs; FIFO-empty in bit 0; FIFO port writes reach only the
// addressed channel and only as 16-bit writes; start and software-reset bits
// give one-clock pulses on the right channels and a software reset restores
// the channel's configuration; FIFO-full and interrupt status read back;
// interrupt vector read/write; calibration write, read, read-complete; ID
// space reads; ack one clock after every strobe.
module tb_host_regmap;
  import dac_pkg::*;
  logic clk = 0;
  logic rst_n = 0;
  logic sel = 0, id_sel = 0, we = 0;
  logic [7:1] addr = 0;
  logic [1:0] be = 0;
  logic [15:0] wdata = 0, rdata;
  logic ack;
  ch_cfg_t cfg [NUM_CH];
  logic [NUM_CH-1:0] ch_rst_req, ch_rst_active = 0, start, fifo_wen, fifo_full = 0, fifo_empty = 0, irq_status = 0;
  logic [15:0] fifo_wdata;
  logic [7:0] irq_vector;
  logic cal_we, cal_re;
  logic [6:0] cal_addr;
  logic [7:0] cal_wdata, cal_rdata;
  logic [7:0] coef [16];
  logic [4:0] id_addr;
  logic [7:0] id_data;
  int checks = 0, failures = 0;
  // event monitors
  logic [NUM_CH-1:0] start_seen = 0, rst_seen = 0;
  int start_pulses = 0, wen_count [NUM_CH];
  logic [15:0] last_fifo_word [NUM_CH];

  always #5 clk = ~clk;

  host_regmap dut (.*);
  cal_coeff_ram #(.DEPTH(16)) u_ram (.clk(clk), .rst_n(rst_n), .we(cal_we), .re(cal_re),
    .addr(cal_addr), .wdata(cal_wdata), .rdata(cal_rdata), .coef(coef));
  id_rom u_id (.addr(id_addr), .data(id_data));

  always @(posedge clk) if (rst_n) begin
    start_seen <= start_seen | start;
    rst_seen   <= rst_seen | ch_rst_req;
    for (int n = 0; n < 8; n++) if (fifo_wen[n]) begin
      wen_count[n]++;
      last_fifo_word[n] = fifo_wdata;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic bus(input bit is_id, input bit w, input logic [7:0] a, input logic [1:0] b,
                     input logic [15:0] d, output logic [15:0] q);
    @(negedge clk);
    sel = !is_id; id_sel = is_id; we = w; addr = a[7:1]; be = b; wdata = d;
    @(negedge clk);
    sel = 0; id_sel = 0; we = 0;
    check(ack, "ack one clock after strobe");
    q = rdata;
  endtask

  task automatic wr(input logic [7:0] a, input logic [1:0] b, input logic [15:0] d);
    logic [15:0] q;
    bus(0, 1, a, b, d, q);
  endtask

  task automatic rd(input logic [7:0] a, output logic [15:0] q);
    bus(0, 0, a, 2'b11, 16'h0, q);
  endtask

  initial begin
    logic [15:0] q;
    logic [7:0] a;
    foreach (wen_count[n]) wen_count[n] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reset values
    for (int n = 0; n < 8; n++) begin
      a = 8'(8 + 6 * n);
      fifo_empty = 8'(1 << n);
      rd(a, q);
      check(q == 16'h5001, $sformatf("ch%0d control word after reset %h", n, q));
      rd(a + 2, q);
      check(q == 16'h0001, $sformatf("ch%0d timer after reset %h", n, q));
    end
    fifo_empty = 0;
    // channel registers: word and byte writes
    for (int n = 0; n < 8; n++) begin
      a = 8'(8 + 6 * n);
      wr(a, 2'b11, {8'(53 + n), 1'b0, 2'b11, 1'b1, 1'b0, 2'b10, 1'b1});
      wr(a + 2, 2'b11, 16'(1000 + n));
    end
    for (int n = 0; n < 8; n++) begin
      a = 8'(8 + 6 * n);
      rd(a, q);
      check(q == {8'(53 + n), 8'b0111_0100}, $sformatf("ch%0d control word %h", n, q));
      check(cfg[n].mode == MODE_CONT && cfg[n].irq_en && cfg[n].irq_thr == THR_64 && !cfg[n].ext_out,
            $sformatf("ch%0d cfg fields", n));
      check(cfg[n].prescaler == 8'(53 + n) && cfg[n].timer == 16'(1000 + n), $sformatf("ch%0d cfg timing", n));
    end
    wr(8'h0E, 2'b10, 16'hC8FF);        // ch1 prescaler byte only
    wr(8'h0E, 2'b01, 16'hFF1E);        // ch1 control byte only: thr 0, en 1, ext 1, mode 11
    rd(8'h0E, q);
    check(q == 16'hC81E, $sformatf("byte writes ch1 %h", q));
    check(cfg[1].mode == MODE_EXT && cfg[1].ext_out, "ch1 ext out mode");
    wr(8'h10, 2'b01, 16'hAB34);        // ch1 timer low byte
    rd(8'h10, q);
    check(q == 16'h0334, $sformatf("ch1 timer byte write %h", q));
    // FIFO ports
    for (int n = 0; n < 8; n++) wr(8'(8 + 6 * n + 4), 2'b11, 16'(16'h1000 * n + 5));
    wr(8'h12, 2'b10, 16'h7777);        // byte write to FIFO port is ignored
    repeat (2) @(negedge clk);
    for (int n = 0; n < 8; n++) begin
      check(wen_count[n] == 1, $sformatf("ch%0d fifo writes %0d", n, wen_count[n]));
      check(last_fifo_word[n] == 16'(16'h1000 * n + 5), $sformatf("ch%0d fifo word", n));
    end
    // start convert
    wr(8'h00, 2'b01, 16'h00A5);
    repeat (2) @(negedge clk);
    check(start_seen == 8'hA5, $sformatf("start pulses %h", start_seen));
    check(start == 0, "start is a pulse");
    // FIFO full status and interrupt status
    fifo_full = 8'h3C;
    rd(8'h00, q);
    check(q == 16'h003C, $sformatf("FIFO full status %h", q));
    irq_status = 8'h81;
    wr(8'h03 & 8'hFE, 2'b01, 16'h00C7);
    rd(8'h02, q);
    check(q == 16'h81C7, $sformatf("interrupt status/vector %h", q));
    check(irq_vector == 8'hC7, "vector output");
    // software reset of channels 2 and 5
    wr(8'h00, 2'b10, 16'h2400);
    repeat (2) @(negedge clk);
    check(rst_seen == 8'h24, $sformatf("reset pulses %h", rst_seen));
    check(cfg[2] == CH_CFG_RESET && cfg[5] == CH_CFG_RESET, "reset channels back to reset values");
    check(cfg[3] != CH_CFG_RESET, "other channels untouched");
    ch_rst_active = 8'h08;             // while a reset is held, writes are overridden
    wr(8'h1A, 2'b11, 16'h1234);
    check(cfg[3] == CH_CFG_RESET, "held reset keeps defaults");
    wr(8'h1E, 2'b11, 16'h1234);        // FIFO port of ch3 during reset
    check(wen_count[3] == 1, "no FIFO write during reset");
    ch_rst_active = 0;
    // calibration memory: write all 16 bytes, read back
    for (int i = 0; i < 16; i++) wr(8'h04, 2'b11, {1'b0, 7'(i), 8'(8'h30 + 3 * i)});
    repeat (2) @(negedge clk);
    for (int i = 0; i < 16; i++) check(coef[i] == 8'(8'h30 + 3 * i), $sformatf("coef %0d", i));
    for (int i = 0; i < 16; i++) begin
      wr(8'h04, 2'b10, {1'b1, 7'(i), 8'h00});
      rd(8'h06, q);
      check(q == {8'(8'h30 + 3 * i), 8'h01}, $sformatf("cal read %0d -> %h", i, q));
    end
    wr(8'h05 & 8'hFE, 2'b01, 16'h0099);   // write data byte alone, then command byte
    wr(8'h04, 2'b10, 16'h0700);
    repeat (2) @(negedge clk);
    check(coef[7] == 8'h99, "two-step calibration write");
    rd(8'h06, q);
    check(q[1:0] == 2'b00, "status after write: not busy, no read pending");
    rd(8'h04, q);
    check(q == 16'h0799, $sformatf("access register read back %h", q));
    // ID space
    for (int i = 0; i < 4; i++) begin
      bus(1, 0, 8'(2 * i + 1), 2'b01, 16'h0, q);
      check(q == {8'h00, 8'(32'("IPAC") >> (8 * (3 - i)))} , $sformatf("ID byte %0d %h", i, q));
    end
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
