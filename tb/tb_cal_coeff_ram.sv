// tb_cal_coeff_ram: self-checking test of the calibration coefficient memory.
// Checks the all-zero reset contents, writes random bytes to every address,
// reads them back (one clock after re) and checks the parallel coefficient
// outputs; writes above the depth must be ignored and read as 0.
module tb_cal_coeff_ram;
  logic clk = 0;
  logic rst_n = 0;
  logic we = 0, re = 0;
  logic [6:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] coef [16];
  logic [7:0] model [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cal_coeff_ram #(.DEPTH(16)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(input int a, input logic [7:0] d);
    @(negedge clk);
    addr = 7'(a); wdata = d; we = 1;
    @(negedge clk);
    we = 0;
  endtask

  task automatic rd(input int a, output logic [7:0] d);
    @(negedge clk);
    addr = 7'(a); re = 1;
    @(negedge clk);
    re = 0;
    d = rdata;
  endtask

  initial begin
    logic [7:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) check(coef[i] == 0, "reset value 0");
    for (int i = 0; i < 16; i++) begin
      model[i] = 8'($urandom);
      wr(i, model[i]);
    end
    wr(16, 8'hAA);
    wr(127, 8'h55);
    for (int i = 0; i < 16; i++) begin
      rd(i, d);
      check(d == model[i], $sformatf("read %0d = %h expected %h", i, d, model[i]));
      check(coef[i] == model[i], $sformatf("coef %0d = %h expected %h", i, coef[i], model[i]));
    end
    rd(16, d);
    check(d == 0, "address 16 reads 0");
    rd(127, d);
    check(d == 0, "address 127 reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
