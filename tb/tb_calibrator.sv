// tb_calibrator: self-checking test of the gain/offset correction.
//
// Drives random and corner samples, coefficients and ranges and compares the
// output, one clock later, with Result = Data*(1+g/262144) + o/4 + Volt
// computed in floating point (each scaled term rounded to nearest, halves up)
// and clamped to the output code range.
module tb_calibrator;
  logic clk = 0;
  logic rst_n = 0;
  logic in_valid = 0;
  logic signed [15:0] in_data = 0;
  logic signed [7:0] gain_err = 0, off_err = 0;
  logic unipolar = 0;
  logic out_valid;
  logic [15:0] out_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  calibrator dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic longint model(int d, int g, int o, bit uni);
    real gt, ot;
    longint r;
    gt = $floor(real'(d) * real'(g) / 262144.0 + 0.5);
    ot = $floor(real'(o) / 4.0 + 0.5);
    r = longint'(d) + longint'(gt) + longint'(ot) + (uni ? 32768 : 0);
    if (uni) begin
      if (r < 0) r = 0;
      if (r > 65535) r = 65535;
      return r;
    end else begin
      if (r < -32768) r = -32768;
      if (r > 32767) r = 32767;
      return r & 16'hFFFF;
    end
  endfunction

  task automatic apply(input int d, input int g, input int o, input bit uni);
    longint exp_v;
    @(negedge clk);
    in_data = 16'(d); gain_err = 8'(g); off_err = 8'(o); unipolar = uni; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    exp_v = model(int'(signed'(16'(d))), int'(signed'(8'(g))), int'(signed'(8'(o))), uni);
    check(out_valid, "out_valid one clock after in_valid");
    check(out_data == 16'(exp_v), $sformatf("d=%0d g=%0d o=%0d uni=%0d got %h expected %h",
          d, g, o, uni, out_data, 16'(exp_v)));
    @(negedge clk);
    check(!out_valid, "out_valid is one clock");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    apply(0, 0, 0, 0);
    apply(1000, 0, 0, 0);
    apply(-32768, -128, -128, 0);
    apply(32767, 127, 127, 0);
    apply(32767, 127, 127, 1);
    apply(-32768, -128, -128, 1);
    apply(20000, 100, -7, 0);
    apply(-5, 0, 6, 0);
    apply(0, 0, 0, 1);
    apply(16'h84DE, 13, 3, 0);
    for (int i = 0; i < 3000; i++)
      apply(int'($urandom_range(0, 65535)) - 32768, int'($urandom_range(0, 255)) - 128,
            int'($urandom_range(0, 255)) - 128, 1'($urandom));
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
