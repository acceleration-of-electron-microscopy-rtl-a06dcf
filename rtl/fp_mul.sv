// fp_mul: combinational IEEE-754 single-precision multiplier.
//
// The accelerator's datapath is built from single-precision multipliers and
// adders; this is the multiplier. The 24x24-bit significand product is
// normalised by at most one position and rounded to nearest, ties to even.
// Simplifications that are this design's own choice: subnormal inputs are read
// as zero and subnormal results are flushed to zero; any input with the
// all-ones exponent (infinity or NaN) and any overflow give infinity of the
// product's sign. Pixel values and coordinates never come near those ranges.
// Interface: y = a * b, purely combinational; the pipeline registers around it.
module fp_mul
  import em_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic        sign;
  logic [7:0]  ea, eb;
  logic [47:0] prod;
  logic [23:0] mant;
  logic        rnd, sticky;
  logic [24:0] mant_r;
  logic signed [10:0] exp;

  always_comb begin
    sign = a[31] ^ b[31];
    ea   = a[30:23];
    eb   = b[30:23];
    prod = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    exp  = $signed({3'b0, ea}) + $signed({3'b0, eb}) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      rnd    = prod[23];
      sticky = |prod[22:0];
      exp    = exp + 11'sd1;
    end else begin
      mant   = prod[46:23];
      rnd    = prod[22];
      sticky = |prod[21:0];
    end
    mant_r = {1'b0, mant} + {24'd0, rnd & (sticky | mant[0])};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp    = exp + 11'sd1;
    end
    if (ea == 8'd0 || eb == 8'd0)
      y = {sign, 31'd0};
    else if (ea == 8'hff || eb == 8'hff || exp >= 11'sd255)
      y = {sign, 8'hff, 23'd0};
    else if (exp <= 11'sd0)
      y = {sign, 31'd0};
    else
      y = {sign, exp[7:0], mant_r[22:0]};
  end

endmodule
