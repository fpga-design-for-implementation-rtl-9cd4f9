// rst_sync: reset synchronizer. Asserts the active-low output as soon as the
// asynchronous input reset goes low, and releases it two clock edges after the
// input is released, so every flop of the domain leaves reset on the same edge.
module rst_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);
  logic meta;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      meta  <= 1'b0;
      rst_n <= 1'b0;
    end else begin
      meta  <= 1'b1;
      rst_n <= meta;
    end
  end
endmodule
