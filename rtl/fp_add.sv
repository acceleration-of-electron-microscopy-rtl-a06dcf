// fp_add: combinational IEEE-754 single-precision adder/subtractor.
//
// Computes y = a + b, or y = a - b when sub is 1. The operand of larger
// magnitude is aligned against the smaller one with guard, round and sticky
// bits; after the addition or subtraction the result is renormalised with a
// leading-zero count and rounded to nearest, ties to even. As in fp_mul,
// subnormals are treated as zero (inputs) and flushed to zero (results), and
// infinity/NaN inputs or overflow give infinity; an exact cancellation gives
// +0. These simplifications are this design's own choice.
// Interface: purely combinational; callers register the result.
module fp_add
  import em_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);

  logic        sa, sb, sx, sy_small;
  logic [7:0]  ex, ey, d;
  logic [26:0] mx, my, shifted;       // 1.23 significand + guard, round, sticky
  logic [27:0] sum;
  logic [4:0]  lz;
  logic [23:0] mant;
  logic [24:0] mant_r;
  logic        g, r, s;
  logic signed [9:0] exp;
  logic        a_zero, b_zero;

  always_comb begin
    sa     = a[31];
    sb     = b[31] ^ sub;
    a_zero = (a[30:23] == 8'd0);
    b_zero = (b[30:23] == 8'd0);
    // order operands by magnitude: x is the larger one
    if (a[30:0] >= b[30:0]) begin
      sx = sa; ex = a[30:23]; mx = {1'b1, a[22:0], 3'b000};
      sy_small = sb; ey = b[30:23]; my = {1'b1, b[22:0], 3'b000};
    end else begin
      sx = sb; ex = b[30:23]; mx = {1'b1, b[22:0], 3'b000};
      sy_small = sa; ey = a[30:23]; my = {1'b1, a[22:0], 3'b000};
    end
    d = ex - ey;
    // align the smaller operand, folding shifted-out bits into sticky
    if (d >= 8'd27)
      shifted = 27'd1;
    else begin
      shifted = my >> d;
      if ((my & ((27'd1 << d) - 27'd1)) != 27'd0)
        shifted[0] = 1'b1;
    end
    exp = $signed({2'b0, ex});
    if (sx == sy_small)
      sum = {1'b0, mx} + {1'b0, shifted};
    else
      sum = {1'b0, mx} - {1'b0, shifted};
    if (sum[27]) begin
      sum = {1'b0, sum[27:2], sum[1] | sum[0]};
      exp = exp + 10'sd1;
    end
    // leading-zero count of sum[26:0]
    lz = 5'd0;
    for (int i = 26; i >= 0; i--) begin
      if (sum[i]) break;
      lz = lz + 5'd1;
    end
    if (lz != 5'd0 && lz < 5'd27) begin
      sum = sum << lz;
      exp = exp - 10'(lz);
    end
    mant = sum[26:3];
    g    = sum[2];
    r    = sum[1];
    s    = sum[0];
    mant_r = {1'b0, mant} + {24'd0, g & (r | s | mant[0])};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp    = exp + 10'sd1;
    end
    if (a[30:23] == 8'hff || b[30:23] == 8'hff)
      y = {(a[30:23] == 8'hff) ? sa : sb, 8'hff, 23'd0};
    else if (a_zero && b_zero)
      y = {sa & sb, 31'd0};
    else if (b_zero)
      y = {sa, a[30:0]};
    else if (a_zero)
      y = {sb, b[30:0]};
    else if (sum[26:0] == 27'd0 || exp <= 10'sd0)
      y = 32'd0;
    else if (exp >= 10'sd255)
      y = {sx, 8'hff, 23'd0};
    else
      y = {sx, exp[7:0], mant_r[22:0]};
  end

endmodule
