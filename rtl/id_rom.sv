// id_rom: the module's 32-byte identification memory.
//
// A carrier board can hold several modules and tells them apart by reading
// this memory. It holds fixed information (an identifier, the manufacturer
// code and the model number) and variable, module-specific information. The
// size and the kinds of content follow the design description; the layout and
// values are this design's choice, in the common IndustryPack style:
//   0x00..0x03  "IPAC"            0x04  manufacturer code   0x05  model
//   0x06        revision          0x07  reserved (0)        0x08..0x09 driver id
//   0x0A        flags             0x0B  number of bytes used (0x0E)
//   0x0C..0x0D  channel count, FIFO depth / 16 (variable information)
//   rest        0
// Read is combinational: data follows addr in the same clock.
module id_rom #(
  parameter logic [7:0]  MANUFACTURER = 8'hA3,
  parameter logic [7:0]  MODEL        = 8'h08,
  parameter logic [7:0]  REVISION     = 8'h01,
  parameter logic [15:0] DRIVER_ID    = 16'h0000
) (
  input  logic [$clog2(dac_pkg::ID_BYTES)-1:0] addr,
  output logic [7:0] data
);
  import dac_pkg::*;

  always_comb begin
    unique case (addr)
      5'h00:   data = 8'h49;             // 'I'
      5'h01:   data = 8'h50;             // 'P'
      5'h02:   data = 8'h41;             // 'A'
      5'h03:   data = 8'h43;             // 'C'
      5'h04:   data = MANUFACTURER;
      5'h05:   data = MODEL;
      5'h06:   data = REVISION;
      5'h08:   data = DRIVER_ID[15:8];
      5'h09:   data = DRIVER_ID[7:0];
      5'h0A:   data = 8'h00;
      5'h0B:   data = 8'h0E;
      5'h0C:   data = 8'(NUM_CH);
      5'h0D:   data = 8'(FIFO_DEPTH / 16);
      default: data = 8'h00;
    endcase
  end
endmodule
