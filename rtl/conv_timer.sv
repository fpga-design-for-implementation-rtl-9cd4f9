// conv_timer: the conversion-rate "double counter" of one channel.
//
// The conversion period is prescaler x conversion_timer clocks of the 8 MHz
// conversion clock, i.e. T[us] = prescaler * timer / 8. Rather than
// multiplying, a prescaler counter counts `prescaler` clocks and each time it
// wraps the second counter advances; when the second counter has counted
// `timer` steps, tick is high for one clock. The first tick comes one full
// period after clear, so after Start Convert the first sample is converted no
// sooner than the period (6.625 us at the minimum prescaler of 53 and timer 1).
//
// A prescaler value of 0 counts as 256 and a timer value of 0 as 65536 (this
// design's choice; the register holds 1..65536 in 16 bits). Values below 53
// are not blocked: the channel logic then simply skips ticks that arrive while
// the DAC link is still busy. prescaler and timer are sampled every clock, so
// the host should change them only while the channel is stopped.
module conv_timer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,      // restart the period (Start Convert)
  input  logic        en,         // count only while the channel runs
  input  logic [7:0]  prescaler,
  input  logic [15:0] timer,
  output logic        tick
);
  logic [8:0]  psc_cnt;
  logic [16:0] tmr_cnt;
  logic [8:0]  psc_last;
  logic [16:0] tmr_last;
  logic        psc_wrap;

  assign psc_last = (prescaler == 8'd0) ? 9'd255 : {1'b0, prescaler} - 9'd1;
  assign tmr_last = (timer == 16'd0) ? 17'd65535 : {1'b0, timer} - 17'd1;
  assign psc_wrap = (psc_cnt >= psc_last);

  always_ff @(posedge clk) begin
    if (!rst_n || clear || !en) begin
      psc_cnt <= '0;
      tmr_cnt <= '0;
      tick    <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (psc_wrap) begin
        psc_cnt <= '0;
        if (tmr_cnt >= tmr_last) begin
          tmr_cnt <= '0;
          tick    <= 1'b1;
        end else begin
          tmr_cnt <= tmr_cnt + 17'd1;
        end
      end else begin
        psc_cnt <= psc_cnt + 9'd1;
      end
    end
  end
endmodule
