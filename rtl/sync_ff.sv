// sync_ff: two-flop synchronizer for a bus of independent level signals.
//
// Each bit is sampled twice in the destination clock domain; the output lags
// the input by two clock edges. Only use it for single bits or Gray-coded
// values whose neighbours differ in one bit. Synchronous active-low reset
// clears both stages to RESET_VAL.
module sync_ff #(
  parameter int unsigned W         = 1,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
