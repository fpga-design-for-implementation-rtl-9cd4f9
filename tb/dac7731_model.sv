// dac7731_model: behavioural receiver of a DAC7731-style 16-bit serial DAC,
// for testbenches only (not synthesizable logic of the board).
//
// While cs_n is low, SDI is shifted in MSB first on each rising SCLK edge.
// When cs_n rises the received word is latched as the DAC code if LDAC is low
// at that moment and exactly 16 bits were received. It records the number of
// frames, the number of malformed frames (a CS pulse with no clock edges,
// as at power-up, is not counted), the time of the last CS fall and the
// last code.
module dac7731_model (
  input  logic sclk,
  input  logic sdi,
  input  logic cs_n,
  input  logic ldac_n
);
  logic [15:0] shreg = '0;
  int          nbits = 0;
  logic [15:0] code = '0;
  int          frames = 0;
  int          bad_frames = 0;
  time         t_cs_fall = 0;
  time         t_cs_fall_prev = 0;

  always @(negedge cs_n) begin
    nbits          = 0;
    t_cs_fall_prev = t_cs_fall;
    t_cs_fall      = $time;
  end

  always @(posedge sclk) begin
    if (!cs_n) begin
      shreg = {shreg[14:0], sdi};
      nbits++;
    end
  end

  always @(posedge cs_n) begin
    if (nbits == 16 && !ldac_n) begin
      code = shreg;
      frames++;
    end else if (nbits != 0) begin
      bad_frames++;
    end
  end
endmodule
