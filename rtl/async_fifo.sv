// async_fifo: per-channel sample buffer, 128 words of 16 bits by default,
// written by the host bus clock and read by the conversion clock.
//
// The buffer follows the description of the board: a first-in first-out
// memory with a 7-bit address and 128 entries that may be written and read in
// different clock domains. How it is built is this design's choice: the usual
// Gray-coded pointer scheme. Each side keeps an (AW+1)-bit binary pointer and
// its Gray copy; the Gray copy of the other side is brought over with two
// flops. Full and the fill count are computed on the write side (the count the
// interrupt logic compares with its threshold, and the FIFO-full status bit),
// empty on the read side. Because the other pointer arrives two clocks late,
// the write side may see the buffer fuller than it is and the read side
// emptier, never the other way round.
//
// Interface: a write with wfull high is dropped, as the host is told to check
// the full bit before writing. rdata is registered: it holds the popped word
// from the clock after ren until the next pop. Each side has its own
// synchronous active-low reset; a software reset of the channel holds both.
module async_fifo #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 128
) (
  // write side (host bus clock)
  input  logic                     wclk,
  input  logic                     wrst_n,
  input  logic                     wen,
  input  logic [DW-1:0]            wdata,
  output logic                     wfull,
  output logic                     wempty,
  output logic [$clog2(DEPTH):0]   wcount,
  // read side (conversion clock)
  input  logic                     rclk,
  input  logic                     rrst_n,
  input  logic                     ren,
  output logic [DW-1:0]            rdata,
  output logic                     rempty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rgray_w, rbin_w;
  logic [AW:0] rbin, rgray, wgray_r;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  sync_ff #(.W(AW+1)) u_rsync (.clk(wclk), .rst_n(wrst_n), .d(rgray), .q(rgray_w));

  assign rbin_w = gray2bin(rgray_w);
  assign wcount = wbin - rbin_w;
  assign wfull  = (wcount == (AW+1)'(DEPTH));
  assign wempty = (wcount == '0);

  always_ff @(posedge wclk) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else if (wen && !wfull) begin
      wbin  <= wbin + 1'b1;
      wgray <= bin2gray(wbin + 1'b1);
    end
  end

  always_ff @(posedge wclk) begin
    if (wen && !wfull) mem[wbin[AW-1:0]] <= wdata;
  end

  // ---------------- read side ----------------
  sync_ff #(.W(AW+1)) u_wsync (.clk(rclk), .rst_n(rrst_n), .d(wgray), .q(wgray_r));

  assign rempty = (wgray_r == rgray);

  always_ff @(posedge rclk) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
      rdata <= '0;
    end else if (ren && !rempty) begin
      rbin  <= rbin + 1'b1;
      rgray <= bin2gray(rbin + 1'b1);
      rdata <= mem[rbin[AW-1:0]];
    end
  end

  // The fill count can never exceed the depth.
  a_count_bound: assert property (@(posedge wclk) disable iff (!wrst_n) wcount <= (AW+1)'(DEPTH));

endmodule
