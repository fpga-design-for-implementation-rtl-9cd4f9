// rst_handshake: turns a one-cycle software reset request in domain A into a
// reset that is held in both domains A and B with overlap.
//
// A request sets req_a. Domain B synchronizes it and holds rst_b while it sees
// it; B's view is synchronized back to A as an acknowledge, which clears req_a.
// rst_a is high from the request until the acknowledge has fallen again, so it
// covers the whole time domain B is in reset and is released last. Used for
// the per-channel software reset, which must clear both halves of the
// channel's asynchronous FIFO together.
module rst_handshake (
  input  logic clk_a,
  input  logic rst_a_n,     // hardware reset, domain A
  input  logic req,         // one-cycle request, domain A
  output logic rst_a,       // held reset, domain A
  input  logic clk_b,
  input  logic rst_b_n,     // hardware reset, domain B
  output logic rst_b        // held reset, domain B
);
  logic req_a;
  logic ack_a;

  always_ff @(posedge clk_a) begin
    if (!rst_a_n)   req_a <= 1'b0;
    else if (ack_a) req_a <= 1'b0;
    else if (req)   req_a <= 1'b1;
  end

  sync_ff #(.W(1)) u_req_sync (.clk(clk_b), .rst_n(rst_b_n), .d(req_a), .q(rst_b));
  sync_ff #(.W(1)) u_ack_sync (.clk(clk_a), .rst_n(rst_a_n), .d(rst_b), .q(ack_a));

  assign rst_a = req | req_a | ack_a;
endmodule
