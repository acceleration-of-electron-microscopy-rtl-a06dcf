// fp_floor: combinational floor of an IEEE-754 single-precision number to a
// signed integer.
//
// q = floor(a) as a W-bit two's-complement integer, saturated to the W-bit
// range; exact is 1 when a is already an integer. It splits a source
// coordinate into the grid position of its upper-left neighbour, and also
// turns the scaled rotation angle into the CORDIC's fixed-point angle.
// Subnormal inputs read as zero. Interface: combinational.
module fp_floor
  import em_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  fp32_t              a,
  output logic signed [W-1:0] q,
  output logic               exact
);

  localparam logic signed [W-1:0] QMAX = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] QMIN = {1'b1, {(W-1){1'b0}}};

  logic [7:0]  e;
  logic [23:0] m;
  logic [W+23:0] ip;     // integer part of |a|
  logic        frac_nz;
  int          sh;

  always_comb begin
    e       = a[30:23];
    m       = {1'b1, a[22:0]};
    ip      = '0;
    frac_nz = 1'b0;
    sh      = int'(e) - 150;        // |a| = m * 2**sh
    q       = '0;
    exact   = 1'b1;
    if (e == 8'd0) begin
      q     = '0;
      exact = 1'b1;
    end else if (int'(e) - 127 >= int'(W) - 1) begin
      q     = a[31] ? QMIN : QMAX;
      exact = 1'b1;
    end else begin
      if (sh >= 0) begin
        ip      = (W+24)'(m) << sh;
        frac_nz = 1'b0;
      end else if (sh > -25) begin
        ip      = (W+24)'(m >> (-sh));
        frac_nz = (m & ((24'd1 << (-sh)) - 24'd1)) != 24'd0;
      end else begin
        ip      = '0;
        frac_nz = 1'b1;
      end
      exact = !frac_nz;
      if (a[31])
        q = W'(-$signed(ip)) - W'(frac_nz);
      else
        q = W'(ip);
    end
  end

endmodule
