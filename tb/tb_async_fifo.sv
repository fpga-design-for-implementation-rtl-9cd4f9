// tb_async_fifo: self-checking test of the dual-clock 128 x 16 sample FIFO.
//
// Write clock 10 ns, read clock 37 ns (unrelated). Phase 1 fills the FIFO with
// the reader stopped: exactly 128 words are accepted, full rises, the count
// reads 128 and further writes are dropped. Phase 2 drains it and checks order
// and empty. Phase 3 runs random writes and reads at the same time against a
// queue model, checking every word, that the count never exceeds 128 and
// never falls below the model's occupancy minus the words in flight.
module tb_async_fifo;
  logic wclk = 0, rclk = 0;
  logic wrst_n = 0, rrst_n = 0;
  logic wen = 0, ren = 0;
  logic [15:0] wdata = 0;
  logic wfull, wempty, rempty;
  logic [7:0] wcount;
  logic [15:0] rdata;
  int checks = 0, failures = 0;
  logic [15:0] model [$];

  always #5 wclk = ~wclk;
  always #18.5 rclk = ~rclk;

  async_fifo #(.DW(16), .DEPTH(128)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic push(input logic [15:0] d);
    @(negedge wclk);
    wen = 1; wdata = d;
    if (!wfull) model.push_back(d);
    @(negedge wclk);
    wen = 0;
  endtask

  task automatic pop_check();
    logic [15:0] e;
    @(negedge rclk);
    if (!rempty) begin
      ren = 1;
      @(negedge rclk);
      ren = 0;
      e = model.pop_front();
      check(rdata == e, $sformatf("read %h expected %h", rdata, e));
    end
  endtask

  initial begin
    repeat (4) @(negedge rclk);
    wrst_n = 1; rrst_n = 1;
    repeat (4) @(negedge rclk);
    check(wempty && rempty && wcount == 0, "empty after reset");
    // phase 1: fill
    for (int i = 0; i < 140; i++) push(16'(i * 7 + 3));
    check(wfull, "full after 140 writes");
    check(wcount == 128, $sformatf("count %0d after fill", wcount));
    check(model.size() == 128, "model holds 128");
    // phase 2: drain
    repeat (4) @(negedge rclk);
    check(!rempty, "not empty before drain");
    while (model.size() > 0) pop_check();
    repeat (4) @(negedge rclk);
    check(rempty, "read side empty after drain");
    repeat (4) @(negedge wclk);
    check(wempty && wcount == 0, "write side empty after drain");
    // phase 3: concurrent random traffic
    fork
      begin
        for (int i = 0; i < 3000; i++) begin
          if ($urandom_range(0, 3) != 0) push(16'($urandom));
          else @(negedge wclk);
          checks++;
          if (wcount > 128) begin
            failures++;
            $display("FAIL: count %0d above depth", wcount);
          end
        end
      end
      begin
        for (int i = 0; i < 2200; i++) begin
          if ($urandom_range(0, 1) != 0) pop_check();
          else @(negedge rclk);
        end
      end
    join
    repeat (6) @(negedge rclk);
    while (model.size() > 0) pop_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge rclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
