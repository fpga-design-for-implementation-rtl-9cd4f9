// tb_conv_timer: self-checking test of the prescaler x timer double counter.
//
// For each (prescaler, timer) pair, clears the timer and measures the clocks
// to the first tick and between the next ticks; both must equal
// prescaler*timer (0 meaning 256 for the prescaler). Covers the reset value
// 80 x 1 (10 us at 8 MHz), the minimum 53 x 1 (6.625 us) and other pairs.
// Also checks that no tick comes while en is low.
module tb_conv_timer;
  logic clk = 0;
  logic rst_n = 0;
  logic clear = 0, en = 0;
  logic [7:0] prescaler = 8'd80;
  logic [15:0] timer = 16'd1;
  logic tick;
  int checks = 0, failures = 0;

  always #62.5 clk = ~clk;   // 8 MHz

  conv_timer dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic measure(input int p, input int t);
    int expected, n;
    expected = (p == 0 ? 256 : p) * (t == 0 ? 65536 : t);
    @(negedge clk);
    prescaler = 8'(p); timer = 16'(t); en = 1; clear = 1;
    @(negedge clk);
    clear = 0;
    // the clear is taken on the edge before this point, so the first
    // interval starts one clock earlier than the following ones
    for (int k = 0; k < 3; k++) begin
      n = (k == 0) ? 0 : 1;
      while (!tick) begin
        @(negedge clk);
        n++;
      end
      check(n == expected, $sformatf("P=%0d T=%0d interval %0d expected %0d", p, t, n, expected));
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    measure(80, 1);
    measure(53, 1);
    measure(53, 2);
    measure(1, 1);
    measure(2, 3);
    measure(255, 4);
    measure(0, 2);
    measure(7, 100);
    // disabled: no ticks
    en = 0;
    prescaler = 8'd1; timer = 16'd1;
    begin
      int seen = 0;
      repeat (50) begin
        @(negedge clk);
        if (tick) seen++;
      end
      check(seen == 0, "no tick while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
