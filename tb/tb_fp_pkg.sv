// tb_fp_pkg: reference conversions between real (IEEE double) and single
// precision bit patterns for the testbenches, built on $realtobits and
// $bitstoreal. to_fp rounds to nearest, ties to even, and flushes values below
// the normal range to zero, as the datapath does.
package tb_fp_pkg;

  function automatic real fp_to_real(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] to_fp(real r);
    logic [63:0] d;
    int          e;
    logic [23:0] m;   // with hidden bit
    logic [28:0] rest;
    logic [24:0] mr;
    if (r == 0.0) return 32'd0;
    d    = $realtobits(r);
    e    = int'(d[62:52]) - 1023 + 127;
    m    = {1'b1, d[51:29]};
    rest = d[28:0];
    mr   = {1'b0, m} + 25'(rest[28] && (rest[27:0] != 0 || m[0]));
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e <= 0) return 32'd0;
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  // a single-precision number with random sign, exponent in [emin, emax]
  function automatic logic [31:0] rand_fp(int emin, int emax);
    return {1'($urandom), 8'(emin + int'($urandom % (emax - emin + 1))), 23'($urandom)};
  endfunction

  function automatic int ulp_diff(logic [31:0] a, logic [31:0] b);
    int ia, ib;
    ia = a[31] ? -int'(a[30:0]) : int'(a[30:0]);
    ib = b[31] ? -int'(b[30:0]) : int'(b[30:0]);
    return (ia > ib) ? ia - ib : ib - ia;
  endfunction

endpackage
