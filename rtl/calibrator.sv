// calibrator: gain and offset correction of one output sample.
//
// Implements the board's correction equation
//     Result = Data * (1 + Gain) + Offset + Volt
// where Gain = gain_err / 262144 (2^18), Offset = off_err / 4 and Volt is 0
// for the bipolar (-5 V..+5 V) range and 32768 for the unipolar (0..10 V)
// range. Data is the 16-bit two's-complement sample from the host. Both
// scaled terms are rounded to the nearest integer (halves round up), and the
// sum is saturated to the output code range: -32768..32767 (two's complement)
// when bipolar, 0..65535 (straight binary) when unipolar. The equation and its
// constants follow the design description; the coefficient width (one signed
// byte each, from the byte-wide calibration access register), the rounding
// and the saturation are this design's choices.
//
// Timing: one register stage. out_valid/out_data follow in_valid by one clock.
module calibrator #(
  parameter int unsigned DW     = 16,
  parameter int unsigned COEF_W = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DW-1:0]     in_data,
  input  logic signed [COEF_W-1:0] gain_err,
  input  logic signed [COEF_W-1:0] off_err,
  input  logic                     unipolar,
  output logic                     out_valid,
  output logic [DW-1:0]            out_data
);
  localparam int unsigned PW = DW + COEF_W;     // product width
  localparam int unsigned SW = DW + 3;          // sum width, enough for all terms

  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] prod_rnd;
  logic signed [PW-19:0] gain_term;
  logic signed [COEF_W:0]   off_rnd;
  logic signed [COEF_W-2:0] off_term;
  logic signed [SW-1:0] sum;
  logic [DW-1:0] sat;

  always_comb begin
    prod      = PW'(in_data) * PW'(gain_err);
    prod_rnd  = prod + PW'(signed'(1 << 17));
    gain_term = prod_rnd[PW-1:18];
    off_rnd   = (COEF_W+1)'(off_err) + (COEF_W+1)'(signed'(2));
    off_term  = off_rnd[COEF_W:2];
    sum       = SW'(in_data) + SW'(gain_term) + SW'(off_term)
              + (unipolar ? SW'(signed'(32768)) : SW'(0));
    if (unipolar) begin
      if (sum < 0)                          sat = '0;
      else if (sum > SW'(signed'(65535)))   sat = '1;
      else                                  sat = sum[DW-1:0];
    end else begin
      if (sum < SW'(signed'(-32768)))       sat = {1'b1, {(DW-1){1'b0}}};
      else if (sum > SW'(signed'(32767)))   sat = {1'b0, {(DW-1){1'b1}}};
      else                                  sat = sum[DW-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= sat;
    end
  end
endmodule
