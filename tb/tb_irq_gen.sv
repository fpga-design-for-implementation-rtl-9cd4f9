// tb_irq_gen: self-checking test of the per-channel interrupt condition.
//
// Sweeps the FIFO fill count 0..128 for every threshold setting with the
// interrupt enabled and disabled; one clock later irq must equal
// enable && threshold set && count < {4, 16, 64}. Includes the threshold-64
// case of the FIFO simulation: the request appears when the count drops
// below 64 and goes away when it reaches 64.
module tb_irq_gen;
  import dac_pkg::*;
  logic clk = 0;
  logic rst_n = 0;
  logic irq_en = 0;
  irq_thr_e irq_thr = THR_NONE;
  logic [7:0] count = 0;
  logic irq;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  irq_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int lim;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int en = 0; en < 2; en++) begin
      for (int t = 0; t < 4; t++) begin
        lim = (t == 1) ? 4 : (t == 2) ? 16 : (t == 3) ? 64 : 0;
        for (int c = 128; c >= 0; c--) begin
          irq_en = 1'(en); irq_thr = irq_thr_e'(t); count = 8'(c);
          @(negedge clk);
          check(irq == (en == 1 && c < lim),
                $sformatf("en=%0d thr=%0d count=%0d irq=%0d", en, t, c, irq));
        end
      end
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
