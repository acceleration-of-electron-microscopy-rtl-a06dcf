// affine_pipeline: rotation and translation of one image, one output pixel per
// clock cycle after the initial latency.
//
// For every pixel (x_r, y_r) of the transformed image the pipeline finds the
// matching point of the original image and interpolates it from the four
// closest original pixels, weighting each by its distance:
//   source  x_s = (x_r-c)*cos(b) + (y_r-c)*sin(b) + c - s_x
//           y_s = (y_r-c)*cos(b) - (x_r-c)*sin(b) + c - s_y,  b = -alpha
//   result  (1-fx)(1-fy) p00 + fx(1-fy) p10 + (1-fx)fy p01 + fx fy p11
// with (x0,y0) = floor(x_s,y_s), (fx,fy) the fractional parts, and 0 when
// (x_s,y_s) falls outside the image. c = (N-1)/2 is the image centre, so the
// rotation turns the image about its middle. All arithmetic is single
// precision (fp_add, fp_mul). The inverse mapping, the four-neighbour
// interpolation, the zero outside the image, single precision, the CORDIC for
// cos/sin and the one-pixel-per-cycle pipeline follow the accelerator's
// description; the centre of rotation, the exact stage split and the way a
// point on the last row/column is handled (x0 clamped to N-2 with fx = 1) are
// this design's own choices.
//
// Sequence per image: when buf_full rises, cos/sin of -alpha are computed by
// the CORDIC, then N*N pixel positions are issued in raster order, one per
// cycle. With the sink always ready the first result is on the output
// ITER + 15 clock edges after the first edge that sees buf_full, and the last
// one N*N - 1 cycles later. buf_release pulses in the cycle the last neighbour read is done, so
// the input side may overwrite the local memory while the pipeline drains.
// Stages: S0 int->float, S1 centre, S2 four products, S3 rotate, S4 shift,
// S5 floor and range test (memory address), S6 fraction (memory data),
// S7 1-f, S8 weights, S9 weighted pixels, S10 and S11 sum: 12 cycles
// from issuing a position to its result on the output register.
// Output: valid/ready; the whole pipeline holds while out_valid && !out_ready.
module affine_pipeline
  import em_pkg::*;
#(
  parameter int unsigned LOG2N = em_pkg::MAX_LOG2N,
  parameter int unsigned ITER  = 28
) (
  input  logic             clk,
  input  logic             rst_n,
  // local memory status and image parameters
  input  logic             buf_full,
  input  img_desc_t        desc,
  input  img_id_t          img_id,
  output logic             buf_release,
  // neighbour read port of the local memory
  output logic             rd_en,
  output logic [LOG2N-1:0] rd_x,
  output logic [LOG2N-1:0] rd_y,
  input  fp32_t            p00,
  input  fp32_t            p10,
  input  fp32_t            p01,
  input  fp32_t            p11,
  // transformed pixels towards DRAM2
  output logic             out_valid,
  input  logic             out_ready,
  output img_id_t          out_img,
  output logic [LOG2N-1:0] out_x,
  output logic [LOG2N-1:0] out_y,
  output fp32_t            out_data,
  output logic             out_last
);

  localparam int unsigned IW      = 16;   // integer width of source positions

  typedef struct packed {
    logic             valid;
    logic             last;
    logic [LOG2N-1:0] x;
    logic [LOG2N-1:0] y;
  } ctl_t;

  typedef enum logic [1:0] {S_IDLE, S_TRIG, S_RUN, S_DRAIN} state_t;

  state_t            state;
  logic              en;
  ctl_t              c0, c1, c2, c3, c4, c5, c6, c7, c8, c9, c10, c11;

  // per-image constants
  fp32_t             k_cos, k_sin, k_c, k_ox, k_oy;
  logic signed [IW-1:0] k_nm1, k_nm2;
  img_id_t           k_img;
  logic [3:0]        k_log2n;

  // ---------------------------------------------------------------- setup
  logic              cordic_start, cordic_done;
  logic signed [31:0] theta, cos_q, sin_q;
  fp32_t             beta_scaled, cos_f, sin_f, c_f, ox_f, oy_f;
  logic signed [15:0] nm1_fx;

  // beta = -alpha scaled by 2**29 (exponent + 29) into the CORDIC angle format
  assign beta_scaled = (desc.angle[30:23] == 8'd0) ? 32'd0
                     : {~desc.angle[31], desc.angle[30:23] + 8'd29, desc.angle[22:0]};

  fp_floor #(.W(32)) u_theta (.a(beta_scaled), .q(theta), .exact());

  cordic_sincos #(.ITER(ITER)) u_cordic (
    .clk, .rst_n, .start(cordic_start), .theta,
    .busy(), .done(cordic_done), .cos_q, .sin_q
  );

  assign nm1_fx = 16'((32'd1 << desc.log2n) - 32'd1);
  fp_from_fixed #(.W(32), .FRAC(30)) u_cosf (.in(cos_q), .y(cos_f));
  fp_from_fixed #(.W(32), .FRAC(30)) u_sinf (.in(sin_q), .y(sin_f));
  fp_from_fixed #(.W(16), .FRAC(1))  u_cf   (.in(nm1_fx), .y(c_f));
  fp_add u_ox (.a(c_f), .b(desc.shift_x), .sub(1'b1), .y(ox_f));
  fp_add u_oy (.a(c_f), .b(desc.shift_y), .sub(1'b1), .y(oy_f));

  assign cordic_start = (state == S_IDLE) && buf_full;

  // ---------------------------------------------------------------- control
  logic [LOG2N-1:0] cx, cy, nmask;
  logic             issue, issue_last;

  assign en         = !c11.valid || out_ready;
  assign nmask      = LOG2N'((32'd1 << k_log2n) - 32'd1);
  assign issue      = (state == S_RUN) && en;
  assign issue_last = (cx == nmask) && (cy == nmask);
  assign rd_en      = en;
  assign buf_release = en && c5.valid && c5.last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cx      <= '0;
      cy      <= '0;
      k_cos   <= '0;
      k_sin   <= '0;
      k_c     <= '0;
      k_ox    <= '0;
      k_oy    <= '0;
      k_nm1   <= '0;
      k_nm2   <= '0;
      k_img   <= '0;
      k_log2n <= 4'd1;
    end else begin
      case (state)
        S_IDLE: if (buf_full) state <= S_TRIG;
        S_TRIG: if (cordic_done) begin
          k_cos   <= cos_f;
          k_sin   <= sin_f;
          k_c     <= c_f;
          k_ox    <= ox_f;
          k_oy    <= oy_f;
          k_nm1   <= IW'((32'd1 << desc.log2n) - 32'd1);
          k_nm2   <= IW'((32'd1 << desc.log2n) - 32'd2);
          k_img   <= img_id;
          k_log2n <= desc.log2n;
          cx      <= '0;
          cy      <= '0;
          state   <= S_RUN;
        end
        S_RUN: if (issue) begin
          if (issue_last) state <= S_DRAIN;
          if (cx == nmask) begin
            cx <= '0;
            cy <= cy + LOG2N'(1);
          end else begin
            cx <= cx + LOG2N'(1);
          end
        end
        S_DRAIN: if (buf_release) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // control words travel with the data
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {c0, c1, c2, c3, c4, c5, c6, c7, c8, c9, c10, c11} <= '0;
    end else if (en) begin
      c0  <= '{valid: issue, last: issue_last, x: cx, y: cy};
      c1  <= c0;
      c2  <= c1;
      c3  <= c2;
      c4  <= c3;
      c5  <= c4;
      c6  <= c5;
      c7  <= c6;
      c8  <= c7;
      c9  <= c8;
      c10 <= c9;
      c11 <= c10;
    end
  end

  // ---------------------------------------------------------------- datapath
  fp32_t xf_d, yf_d;                                 // S0 inputs
  fp32_t s0_x, s0_y;
  fp32_t xr_d, yr_d, s1_x, s1_y;
  fp32_t mxc_d, mys_d, mxs_d, myc_d, s2_xc, s2_ys, s2_xs, s2_yc;
  fp32_t u_d, v_d, s3_u, s3_v;
  fp32_t xs_d, ys_d, s4_xs, s4_ys;
  logic signed [IW-1:0] x0_d, y0_d, s5_x0, s5_y0;
  logic  xex_d, yex_d, in_d, s5_in;
  fp32_t s5_xs, s5_ys;
  fp32_t x0f_d, y0f_d, fx_d, fy_d, s6_fx, s6_fy;
  logic  s6_in;
  fp32_t wx0_d, wy0_d, s7_fx, s7_fy, s7_wx0, s7_wy0;
  fp32_t s7_p00, s7_p10, s7_p01, s7_p11;
  logic  s7_in;
  fp32_t w00_d, w10_d, w01_d, w11_d, s8_w00, s8_w10, s8_w01, s8_w11;
  fp32_t s8_p00, s8_p10, s8_p01, s8_p11;
  logic  s8_in;
  fp32_t t00_d, t10_d, t01_d, t11_d, s9_t00, s9_t10, s9_t01, s9_t11;
  logic  s9_in;
  fp32_t a_d, b_d, s10_a, s10_b;
  logic  s10_in;
  fp32_t r_d, s11_r;

  // S0: integer position to float
  fp_from_fixed #(.W(LOG2N + 1), .FRAC(0)) u_xf (.in({1'b0, cx}), .y(xf_d));
  fp_from_fixed #(.W(LOG2N + 1), .FRAC(0)) u_yf (.in({1'b0, cy}), .y(yf_d));
  // S1: relative to the centre
  fp_add u_xr (.a(s0_x), .b(k_c), .sub(1'b1), .y(xr_d));
  fp_add u_yr (.a(s0_y), .b(k_c), .sub(1'b1), .y(yr_d));
  // S2: products
  fp_mul u_mxc (.a(s1_x), .b(k_cos), .y(mxc_d));
  fp_mul u_mys (.a(s1_y), .b(k_sin), .y(mys_d));
  fp_mul u_mxs (.a(s1_x), .b(k_sin), .y(mxs_d));
  fp_mul u_myc (.a(s1_y), .b(k_cos), .y(myc_d));
  // S3: rotation
  fp_add u_u (.a(s2_xc), .b(s2_ys), .sub(1'b0), .y(u_d));
  fp_add u_v (.a(s2_yc), .b(s2_xs), .sub(1'b1), .y(v_d));
  // S4: back to the corner origin and translation
  fp_add u_xs (.a(s3_u), .b(k_ox), .sub(1'b0), .y(xs_d));
  fp_add u_ys (.a(s3_v), .b(k_oy), .sub(1'b0), .y(ys_d));
  // S5: grid position of the upper-left neighbour, inside test
  fp_floor #(.W(IW)) u_x0 (.a(s4_xs), .q(x0_d), .exact(xex_d));
  fp_floor #(.W(IW)) u_y0 (.a(s4_ys), .q(y0_d), .exact(yex_d));
  assign in_d = (x0_d >= 0) && ((x0_d < k_nm1) || (x0_d == k_nm1 && xex_d)) &&
                (y0_d >= 0) && ((y0_d < k_nm1) || (y0_d == k_nm1 && yex_d));
  // S6: fractional parts; memory address from S5
  assign rd_x = LOG2N'(s5_x0);
  assign rd_y = LOG2N'(s5_y0);
  fp_from_fixed #(.W(IW), .FRAC(0)) u_x0f (.in(s5_x0), .y(x0f_d));
  fp_from_fixed #(.W(IW), .FRAC(0)) u_y0f (.in(s5_y0), .y(y0f_d));
  fp_add u_fx (.a(s5_xs), .b(x0f_d), .sub(1'b1), .y(fx_d));
  fp_add u_fy (.a(s5_ys), .b(y0f_d), .sub(1'b1), .y(fy_d));
  // S7: complementary weights
  fp_add u_wx0 (.a(FP_ONE), .b(s6_fx), .sub(1'b1), .y(wx0_d));
  fp_add u_wy0 (.a(FP_ONE), .b(s6_fy), .sub(1'b1), .y(wy0_d));
  // S8: bilinear weights
  fp_mul u_w00 (.a(s7_wx0), .b(s7_wy0), .y(w00_d));
  fp_mul u_w10 (.a(s7_fx),  .b(s7_wy0), .y(w10_d));
  fp_mul u_w01 (.a(s7_wx0), .b(s7_fy),  .y(w01_d));
  fp_mul u_w11 (.a(s7_fx),  .b(s7_fy),  .y(w11_d));
  // S9: weighted neighbours
  fp_mul u_t00 (.a(s8_p00), .b(s8_w00), .y(t00_d));
  fp_mul u_t10 (.a(s8_p10), .b(s8_w10), .y(t10_d));
  fp_mul u_t01 (.a(s8_p01), .b(s8_w01), .y(t01_d));
  fp_mul u_t11 (.a(s8_p11), .b(s8_w11), .y(t11_d));
  // S10, S11: sum
  fp_add u_a (.a(s9_t00), .b(s9_t10), .sub(1'b0), .y(a_d));
  fp_add u_b (.a(s9_t01), .b(s9_t11), .sub(1'b0), .y(b_d));
  fp_add u_r (.a(s10_a),  .b(s10_b),  .sub(1'b0), .y(r_d));

  always_ff @(posedge clk) begin
    if (en) begin
      s0_x  <= xf_d;   s0_y  <= yf_d;
      s1_x  <= xr_d;   s1_y  <= yr_d;
      s2_xc <= mxc_d;  s2_ys <= mys_d;  s2_xs <= mxs_d;  s2_yc <= myc_d;
      s3_u  <= u_d;    s3_v  <= v_d;
      s4_xs <= xs_d;   s4_ys <= ys_d;
      s5_in <= in_d;
      s5_xs <= s4_xs;  s5_ys <= s4_ys;
      // clamp so that (x0+1, y0+1) is still a pixel; fx/fy become 1.0 then
      s5_x0 <= !in_d ? '0 : (x0_d > k_nm2) ? k_nm2 : x0_d;
      s5_y0 <= !in_d ? '0 : (y0_d > k_nm2) ? k_nm2 : y0_d;
      s6_in <= s5_in;  s6_fx <= fx_d;   s6_fy <= fy_d;
      s7_in <= s6_in;  s7_fx <= s6_fx;  s7_fy <= s6_fy;
      s7_wx0 <= wx0_d; s7_wy0 <= wy0_d;
      s7_p00 <= p00;   s7_p10 <= p10;   s7_p01 <= p01;   s7_p11 <= p11;
      s8_in <= s7_in;
      s8_w00 <= w00_d; s8_w10 <= w10_d; s8_w01 <= w01_d; s8_w11 <= w11_d;
      s8_p00 <= s7_p00; s8_p10 <= s7_p10; s8_p01 <= s7_p01; s8_p11 <= s7_p11;
      s9_in <= s8_in;
      s9_t00 <= t00_d; s9_t10 <= t10_d; s9_t01 <= t01_d; s9_t11 <= t11_d;
      s10_in <= s9_in; s10_a <= a_d;    s10_b <= b_d;
      s11_r <= s10_in ? r_d : FP_ZERO;
    end
  end

  // valid/ready rule of the output: a result not taken stays offered, unchanged
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable({out_x, out_y, out_data, out_last}));
  // the memory is released exactly once per image, after the last read
  a_release: assert property (@(posedge clk) disable iff (!rst_n)
    buf_release |-> state == S_DRAIN);

  assign out_valid = c11.valid;
  assign out_img   = k_img;
  assign out_x     = c11.x;
  assign out_y     = c11.y;
  assign out_last  = c11.last;
  assign out_data  = s11_r;

endmodule
