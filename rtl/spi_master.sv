// spi_master: write-only serial link to one DAC7731-style converter.
//
// There is nothing to read back from the DAC, so the link has no MISO; it
// drives SCLK, SDI (MOSI), an active-low chip select and the active-low LDAC
// (load DAC) line. A start with the 16-bit word shifts it out MSB first: a
// bit counter runs down from 15 to 0 and SDI shows data[count]. SDI changes
// while SCLK is low and is stable on the rising edge, where the DAC samples it.
// LDAC is held low for the whole frame and released one clock after CS rises,
// so the DAC's output follows the word as the frame closes. Keeping LDAC low
// during the transfer follows the design description; the exact edge
// placement and the SCLK rate are this design's choices.
//
// Timing with HALF clocks per SCLK half period: CS and LDAC fall on the clock
// edge that takes start; 16 bits take 32*HALF clocks, then CS rises; LDAC
// rises one clock later, together with the done pulse, and busy drops. With
// HALF=1 a frame is busy for 33 clocks, well inside the 53-clock minimum
// conversion period, so consecutive frames never collide.
module spi_master #(
  parameter int unsigned DW   = 16,
  parameter int unsigned HALF = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] data,
  output logic          busy,
  output logic          done,      // one-clock pulse when the frame ends
  output logic          sclk,
  output logic          sdi,
  output logic          cs_n,
  output logic          ldac_n
);
  typedef enum logic [1:0] {S_IDLE, S_LOW, S_HIGH, S_END} state_e;

  localparam int unsigned CW = (HALF > 1) ? $clog2(HALF) : 1;

  state_e                   state;
  logic [DW-1:0]            shreg;
  logic [$clog2(DW)-1:0]    bitcnt;
  logic [CW-1:0]            hcnt;
  logic                     hdone;

  assign hdone = (hcnt == CW'(HALF - 1));
  assign busy  = (state != S_IDLE);
  assign sdi   = shreg[bitcnt];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      shreg  <= '0;
      bitcnt <= '0;
      hcnt   <= '0;
      sclk   <= 1'b0;
      cs_n   <= 1'b1;
      ldac_n <= 1'b1;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            shreg  <= data;
            bitcnt <= $clog2(DW)'(DW - 1);
            hcnt   <= '0;
            cs_n   <= 1'b0;
            ldac_n <= 1'b0;
            sclk   <= 1'b0;
            state  <= S_LOW;
          end
        end
        S_LOW: begin
          hcnt <= hcnt + 1'b1;
          if (hdone) begin
            hcnt  <= '0;
            sclk  <= 1'b1;
            state <= S_HIGH;
          end
        end
        S_HIGH: begin
          hcnt <= hcnt + 1'b1;
          if (hdone) begin
            hcnt <= '0;
            sclk <= 1'b0;
            if (bitcnt == '0) begin
              cs_n  <= 1'b1;
              state <= S_END;
            end else begin
              bitcnt <= bitcnt - 1'b1;
              state  <= S_LOW;
            end
          end
        end
        S_END: begin
          ldac_n <= 1'b1;
          done   <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A new frame may only be started while the link is idle.
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
