// em_pkg: types and constants shared by the affine-transformation accelerator.
//
// All pixel values and all arithmetic inside the pipelines are IEEE-754 single
// precision, as in the accelerator this RTL implements. A per-image descriptor
// travels with every image from the input stream to the pipeline that
// processes it: the rotation angle alpha and the shift (s_x, s_y) in single
// precision, and the image side as a power of two. The transformation applied
// is the inverse one (beta = -alpha, delta = -s), as in the reference
// algorithm. Image numbers tag the results so the DRAM2 writer knows where
// each output pixel belongs.
package em_pkg;

  typedef logic [31:0] fp32_t;

  // Largest image side supported by the local memories: 2**MAX_LOG2N.
  // 512x512 images (electron tomography) are the largest workload.
  localparam int unsigned MAX_LOG2N = 9;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3f80_0000;

  typedef logic [15:0] img_id_t;

  typedef struct packed {
    fp32_t      angle;    // rotation alpha in radians, |alpha| <= pi
    fp32_t      shift_x;  // translation s_x in pixels
    fp32_t      shift_y;  // translation s_y in pixels
    logic [3:0] log2n;    // image side is 2**log2n, 1 <= log2n <= MAX_LOG2N
  } img_desc_t;

  function automatic fp32_t fp_neg(fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

endpackage
