// tb_id_rom: self-checking test of the 32-byte identification memory.
// Reads every byte and compares it with the expected layout: "IPAC", the
// manufacturer, model and revision parameters, the byte count, the channel
// count and the FIFO depth / 16, zeros elsewhere.
module tb_id_rom;
  logic [4:0] addr;
  logic [7:0] data;
  logic [7:0] expected [32];
  int checks = 0, failures = 0;

  id_rom #(.MANUFACTURER(8'h5A), .MODEL(8'h21), .REVISION(8'h03), .DRIVER_ID(16'h1234)) dut (.*);

  initial begin
    foreach (expected[i]) expected[i] = 8'h00;
    expected[0] = "I"; expected[1] = "P"; expected[2] = "A"; expected[3] = "C";
    expected[4] = 8'h5A; expected[5] = 8'h21; expected[6] = 8'h03;
    expected[8] = 8'h12; expected[9] = 8'h34; expected[11] = 8'h0E;
    expected[12] = 8'd8; expected[13] = 8'd8;
    for (int i = 0; i < 32; i++) begin
      addr = 5'(i);
      #1;
      checks++;
      if (data !== expected[i]) begin
        failures++;
        $display("FAIL: byte %0d = %h expected %h", i, data, expected[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
