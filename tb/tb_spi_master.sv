// tb_spi_master: self-checking test of the DAC SPI link.
//
// Sends the word 1000_0100_1101_1110 and 200 random words, with SCLK at clk/2
// (HALF=1) and clk/4 (HALF=2). An independent receiver samples SDI on every
// rising SCLK edge while CS is low and checks the word, the MSB-first order,
// the bit count, LDAC low for the whole frame, and the frame length in clocks
// (32*HALF+1 busy clocks).
module tb_spi_master;
  logic clk = 0;
  logic rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic        start [2];
  logic [15:0] data  [2];
  logic        busy [2], done [2], sclk [2], sdi [2], cs_n [2], ldac_n [2];

  spi_master #(.HALF(1)) u_h1 (.clk(clk), .rst_n(rst_n), .start(start[0]), .data(data[0]),
    .busy(busy[0]), .done(done[0]), .sclk(sclk[0]), .sdi(sdi[0]), .cs_n(cs_n[0]), .ldac_n(ldac_n[0]));
  spi_master #(.HALF(2)) u_h2 (.clk(clk), .rst_n(rst_n), .start(start[1]), .data(data[1]),
    .busy(busy[1]), .done(done[1]), .sclk(sclk[1]), .sdi(sdi[1]), .cs_n(cs_n[1]), .ldac_n(ldac_n[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // receive one frame on link k, return the word and the busy length
  task automatic send(input int k, input logic [15:0] w);
    logic [15:0] rx;
    int nb, busy_cyc;
    bit ldac_ok;
    logic sclk_q;
    @(negedge clk);
    data[k] = w; start[k] = 1;
    @(negedge clk);
    start[k] = 0;
    rx = '0; nb = 0; busy_cyc = 0; ldac_ok = 1; sclk_q = sclk[k];
    while (busy[k]) begin
      busy_cyc++;
      if (!cs_n[k] && ldac_n[k]) ldac_ok = 0;
      @(negedge clk);
      if (sclk[k] && !sclk_q && !cs_n[k]) begin
        rx = {rx[14:0], sdi[k]};
        nb++;
      end
      sclk_q = sclk[k];
    end
    check(rx == w, $sformatf("link %0d word %h got %h", k, w, rx));
    check(nb == 16, $sformatf("link %0d bit count %0d", k, nb));
    check(ldac_ok, "LDAC low throughout frame");
    check(busy_cyc == 32 * (k + 1) + 1, $sformatf("link %0d busy %0d clocks", k, busy_cyc));
    check(cs_n[k] && ldac_n[k], "idle levels after frame");
  endtask

  initial begin
    start[0] = 0; start[1] = 0; data[0] = 0; data[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(cs_n[0] && ldac_n[0] && !busy[0], "reset idle");
    for (int k = 0; k < 2; k++) begin
      send(k, 16'b1000_0100_1101_1110);
      for (int i = 0; i < 200; i++) send(k, 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
