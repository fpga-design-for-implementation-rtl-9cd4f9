// pulse_sync: carries single-cycle pulses from clock domain A to domain B.
//
// A pulse on src_pulse flips a toggle flop in domain A; domain B synchronizes
// the toggle with two flops and emits one dst_pulse for each change it sees.
// Latency is two to three destination clocks. Pulses closer together than
// about three destination clocks merge; the Start Convert and trigger events it
// carries on this board are far apart.
module pulse_sync (
  input  logic clk_a,
  input  logic rst_a_n,
  input  logic src_pulse,
  input  logic clk_b,
  input  logic rst_b_n,
  output logic dst_pulse
);
  logic tog_a;
  logic tog_b;
  logic tog_b_q;

  always_ff @(posedge clk_a) begin
    if (!rst_a_n)       tog_a <= 1'b0;
    else if (src_pulse) tog_a <= ~tog_a;
  end

  sync_ff #(.W(1)) u_sync (.clk(clk_b), .rst_n(rst_b_n), .d(tog_a), .q(tog_b));

  always_ff @(posedge clk_b) begin
    if (!rst_b_n) tog_b_q <= 1'b0;
    else          tog_b_q <= tog_b;
  end

  assign dst_pulse = tog_b ^ tog_b_q;
endmodule
