// tb_em_affine_top: end-to-end test of the accelerator at a reduced image
// grid (32 x 32). A DRAM1 model streams images of mixed sizes, angles and
// shifts; a DRAM2 model takes the tagged results, checks each against the
// double-precision reference (within 1e-4), and checks that every pixel of
// every image arrives exactly once. Phase 1 applies random back-pressure on
// the DRAM2 side; phase 2 streams six equal images with none and checks the
// throughput: after the first image, close to one pixel per cycle in and out,
// with only the per-image setup and drain cycles lost.
// Mechanisms counted (each must occur): input held because the target local
// memory is still being read, both pipelines offering a result in the same
// cycle, DRAM2 back-pressure, pixels outside the original image, angles
// beyond +-pi/2, a change of image size, images on each of the two lanes.
module tb_em_affine_top;
  import em_pkg::*;
  import tb_fp_pkg::*;
  import tb_em_ref_pkg::*;
  localparam int L = 5;
  localparam int ITER = 28;
  localparam int NIMG1 = 8, NIMG2 = 6, NIMG = NIMG1 + NIMG2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_last;
  fp32_t in_data, out_data;
  img_desc_t in_desc;
  img_id_t out_img;
  logic [L-1:0] out_x, out_y;
  int checks = 0, failures = 0, skipped = 0;
  longint cyc = 0;
  bit backpressure = 1;

  // image parameters
  int  sz  [NIMG];
  real ang [NIMG], shx [NIMG], shy [NIMG];
  int  got [NIMG];
  bit  seen [int];

  // mechanism counters
  int n_in_stall = 0, n_contend = 0, n_out_stall = 0, n_outside = 0, n_fold = 0;
  int n_size_switch = 0, n_lane [2] = '{0, 0};

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  em_affine_top #(.LOG2N(L), .ITER(ITER)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_desc,
    .out_valid, .out_ready, .out_img, .out_x, .out_y, .out_data, .out_last);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL %s", msg);
  endtask

  // DRAM1 model: streams images k = first..last in raster order
  task automatic stream(int first, int last);
    for (int k = first; k <= last; k++) begin
      int n = 1 << sz[k];
      if (k > 0 && sz[k] != sz[k - 1]) n_size_switch++;
      if (ang[k] > 1.5708 || ang[k] < -1.5708) n_fold++;
      for (int y = 0; y < n; y++)
        for (int x = 0; x < n; x++) begin
          @(negedge clk);
          in_valid = 1;
          in_data  = to_fp(test_pixel(k + 1, x, y));
          in_desc  = '{angle: to_fp(ang[k]), shift_x: to_fp(shx[k]), shift_y: to_fp(shy[k]),
                       log2n: 4'(sz[k])};
          #1;
          while (!in_ready) begin n_in_stall++; @(negedge clk); #1; end
          @(posedge clk);
        end
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  always @(negedge clk) out_ready <= backpressure ? ($urandom % 4 != 0) : 1'b1;

  // DRAM2 model and checker
  always @(posedge clk) if (rst_n) begin
    if (dut.pv == 2'b11) n_contend++;
    if (out_valid && !out_ready) n_out_stall++;
    if (out_valid && out_ready) begin
      automatic int k = int'(out_img) - 1;
      if (k < 0 || k >= NIMG) fail($sformatf("bad image tag %0d", out_img));
      else begin
        automatic int n = 1 << sz[k];
        automatic int key = k * 65536 + int'(out_y) * 256 + int'(out_x);
        real xs, ys, want, have;
        bit in_area, border;
        int x0, y0;
        checks++;
        if (seen.exists(key) || int'(out_x) >= n || int'(out_y) >= n)
          fail($sformatf("img %0d pixel (%0d,%0d) repeated or out of range", k + 1, out_x, out_y));
        seen[key] = 1;
        got[k]++;
        n_lane[k % 2]++;
        source_point(sz[k], ang[k], shx[k], shy[k], int'(out_x), int'(out_y), xs, ys, in_area, border);
        have = fp_to_real(out_data);
        if (border) skipped++;
        else begin
          if (in_area) begin
            x0 = corner(xs, sz[k]);
            y0 = corner(ys, sz[k]);
            want = bilinear(test_pixel(k + 1, x0, y0), test_pixel(k + 1, x0 + 1, y0),
                            test_pixel(k + 1, x0, y0 + 1), test_pixel(k + 1, x0 + 1, y0 + 1),
                            xs - real'(x0), ys - real'(y0));
          end else begin
            want = 0.0;
            n_outside++;
          end
          checks++;
          if (have - want > 1e-4 || want - have > 1e-4)
            fail($sformatf("img %0d (%0d,%0d) got %f expected %f", k + 1, out_x, out_y, have, want));
        end
      end
    end
  end

  function automatic bit all_done(int first, int last);
    for (int k = first; k <= last; k++)
      if (got[k] != (1 << (2 * sz[k]))) return 0;
    return 1;
  endfunction

  initial begin
    longint t0, t1;
    int pixels;
    // phase 1: mixed sizes and transformations, random back-pressure
    sz  = '{5, 5, 4, 3, 5, 5, 2, 5,   5, 5, 5, 5, 5, 5};
    ang = '{0.3, -2.0, 1.0, 0.0, 0.7854, 3.0, 0.2, -0.5,   0.1, -0.4, 2.2, 0.9, -3.0, 1.3};
    shx = '{1.0, 0.0, 2.5, 0.0, -3.0, 0.5, 0.0, 0.0,   0.5, -1.5, 0.0, 2.0, 0.25, 0.0};
    shy = '{-0.5, 0.0, 2.5, 0.0, 1.25, 0.0, 0.0, 4.0,   0.0, 0.75, 1.0, -2.0, 0.0, 0.0};
    foreach (got[k]) got[k] = 0;
    in_desc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    stream(0, NIMG1 - 1);
    while (!all_done(0, NIMG1 - 1)) @(posedge clk);
    // phase 2: six 32 x 32 images, DRAM2 always ready
    backpressure = 0;
    repeat (5) @(posedge clk);
    t0 = cyc;
    stream(NIMG1, NIMG - 1);
    while (!all_done(NIMG1, NIMG - 1)) @(posedge clk);
    t1 = cyc;
    pixels = NIMG2 * (1 << (2 * L));
    checks++;
    // per image at most: CORDIC setup (ITER + 2), issue-to-result latency (12),
    // and a few handover cycles; loading the first image is not overlapped
    if (t1 - t0 > longint'(pixels + NIMG2 * (ITER + 20) + (1 << (2 * L))))
      fail($sformatf("phase 2: %0d pixels took %0d cycles", pixels, t1 - t0));
    $display("phase 2: %0d pixels in %0d cycles", pixels, t1 - t0);
    checks += 7;
    if (n_in_stall == 0)    fail("input never held");
    if (n_contend == 0)     fail("pipelines never contended");
    if (n_out_stall == 0)   fail("no DRAM2 back-pressure");
    if (n_outside == 0)     fail("no pixel outside the image");
    if (n_fold == 0)        fail("no angle beyond pi/2");
    if (n_size_switch == 0) fail("no size change");
    if (n_lane[0] == 0 || n_lane[1] == 0) fail("a lane was never used");
    $display("in_stall=%0d contend=%0d out_stall=%0d outside=%0d fold=%0d size_switch=%0d lane0=%0d lane1=%0d skipped=%0d",
             n_in_stall, n_contend, n_out_stall, n_outside, n_fold, n_size_switch,
             n_lane[0], n_lane[1], skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
