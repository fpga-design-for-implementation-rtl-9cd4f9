// irq_gen: interrupt condition of one channel (host bus clock domain).
//
// When the channel's interrupt enable bit is set and a threshold is chosen
// (4, 16 or 64 samples), the channel requests service while its FIFO holds
// fewer samples than the threshold, so the host can refill it before it runs
// dry. The comparison follows the design description. The request is a
// registered level (one clock behind the fill count) that stays high until
// the host has written enough samples, disables the interrupt or resets the
// channel; this level behaviour is this design's choice.
module irq_gen
  import dac_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               irq_en,
  input  irq_thr_e           irq_thr,
  input  logic [FIFO_AW:0]   count,     // samples in the FIFO (write-side view)
  output logic               irq        // interrupt status bit of the channel
);
  always_ff @(posedge clk) begin
    if (!rst_n) irq <= 1'b0;
    else        irq <= irq_en && (irq_thr != THR_NONE) && (count < thr_value(irq_thr));
  end
endmodule
