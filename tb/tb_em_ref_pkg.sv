// tb_em_ref_pkg: reference model of the image transformation in double
// precision, written from the mathematical definition and independent of the
// RTL's number formats. For output pixel (x, y) of an N x N image rotated by
// alpha about its centre c = (N-1)/2 and shifted by (sx, sy), the source
// point is
//   xs = (x-c)cos(-alpha) + (y-c)sin(-alpha) + c - sx
//   ys = (y-c)cos(-alpha) - (x-c)sin(-alpha) + c - sy
// and the result is the bilinear interpolation of the four pixels around it,
// or 0 outside [0, N-1] x [0, N-1]. Points within 1e-3 of that border are
// flagged so testbenches can skip them: there the result may legitimately
// jump between 0 and the interpolated value on a rounding difference.
package tb_em_ref_pkg;

  function automatic void source_point(int log2n, real alpha, real sx, real sy, int x, int y,
                                       output real xs, output real ys,
                                       output bit in_area, output bit border);
    real c, b, m;
    c  = real'((1 << log2n) - 1) / 2.0;
    m  = real'((1 << log2n) - 1);
    b  = -alpha;
    xs = (real'(x) - c) * $cos(b) + (real'(y) - c) * $sin(b) + c - sx;
    ys = (real'(y) - c) * $cos(b) - (real'(x) - c) * $sin(b) + c - sy;
    in_area = (xs >= 0.0) && (xs <= m) && (ys >= 0.0) && (ys <= m);
    border = (xs > -1e-3 && xs < 1e-3) || (xs > m - 1e-3 && xs < m + 1e-3) ||
             (ys > -1e-3 && ys < 1e-3) || (ys > m - 1e-3 && ys < m + 1e-3);
  endfunction

  // upper-left neighbour used for a point in_area the image
  function automatic int corner(real s, int log2n);
    int q = int'($floor(s));
    if (q > (1 << log2n) - 2) q = (1 << log2n) - 2;
    if (q < 0) q = 0;
    return q;
  endfunction

  function automatic real bilinear(real p00, real p10, real p01, real p11, real fx, real fy);
    return (1.0 - fx) * (1.0 - fy) * p00 + fx * (1.0 - fy) * p10 +
           (1.0 - fx) * fy * p01 + fx * fy * p11;
  endfunction

  // test image value at (x, y): a smooth pattern plus a hashed component, in [0, 1)
  function automatic real test_pixel(int img, int x, int y);
    int h = (x * 7919 + y * 104729 + img * 15485863) % 1000;
    if (h < 0) h = -h;
    return 0.5 + 0.3 * $sin(0.3 * real'(x) + 0.1 * real'(img)) * $cos(0.2 * real'(y))
           + 0.0002 * real'(h) - 0.1;
  endfunction

endpackage
