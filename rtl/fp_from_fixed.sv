// fp_from_fixed: combinational conversion of a signed fixed-point number to
// IEEE-754 single precision.
//
// The input is a W-bit two's-complement value with FRAC fraction bits, so the
// number represented is in / 2**FRAC. The magnitude is normalised with a
// leading-one search and its top 24 bits form the significand; lower bits are
// dropped (rounding toward zero), which is exact for every integer pixel
// coordinate and loses less than one unit in the last place for the CORDIC
// outputs. Truncation is this design's own choice.
// Interface: y = float(in / 2**FRAC), combinational.
module fp_from_fixed
  import em_pkg::*;
#(
  parameter int unsigned W    = 32,
  parameter int          FRAC = 0
) (
  input  logic signed [W-1:0] in,
  output fp32_t               y
);

  logic [W-1:0] mag, norm;
  logic [W+23:0] wide;
  int           msb;
  logic [23:0]  sig;

  always_comb begin
    mag = in[W-1] ? W'(-in) : W'(in);
    msb = -1;
    for (int i = 0; i < int'(W); i++)
      if (mag[i]) msb = i;
    norm = mag << (W - 1 - msb);
    wide = {norm, 24'd0};
    sig  = wide[W+23 -: 24];
    if (msb < 0)
      y = 32'd0;
    else
      y = {in[W-1], 8'(127 + msb - FRAC), sig[22:0]};
  end

endmodule
