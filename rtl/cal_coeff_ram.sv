// cal_coeff_ram: calibration coefficient memory.
//
// Each channel has a signed offset-error byte and a signed gain-error byte.
// The host reaches the memory through the calibration access registers with a
// 7-bit byte address; instead of going through a serial EEPROM, the memory is
// on chip so that reads and writes finish at once. That much follows the
// design description; the layout is this design's choice:
//   byte 2n   = offset error of channel n   (Offset = value / 4)
//   byte 2n+1 = gain error of channel n     (Gain   = value / 262144)
// Addresses at or above DEPTH read 0 and ignore writes.
//
// Host port: synchronous, a write takes effect on the clock edge where we is
// high; rdata shows the addressed byte one clock after re. The coefficient
// outputs show every byte continuously; they are read by the conversion clock
// domain and are meant to be static while channels convert. Cleared to 0
// (no correction) by hardware reset.
module cal_coeff_ram #(
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic             re,
  input  logic [6:0]       addr,
  input  logic [7:0]       wdata,
  output logic [7:0]       rdata,
  output logic [7:0]       coef [DEPTH]
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
      rdata <= '0;
    end else begin
      if (we && 32'(addr) < DEPTH) mem[addr[$clog2(DEPTH)-1:0]] <= wdata;
      if (re) rdata <= (32'(addr) < DEPTH) ? mem[addr[$clog2(DEPTH)-1:0]] : 8'h00;
    end
  end

  assign coef = mem;
endmodule
