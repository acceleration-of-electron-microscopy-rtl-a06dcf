// tb_em_affine_full: the accelerator at its default size (512 x 512 local
// memories, 28 CORDIC iterations), no parameter overridden. Streams one
// electron-tomography sized image (512 x 512) followed by three
// single-particle-analysis sized images (64 x 64), checks every result
// against the double-precision reference within 1e-4 and that each pixel of
// each image arrives once, and checks the timing: while the 512 x 512 image
// is being produced, DRAM2 receives one result every cycle (results of the
// next image, from the other pipeline, fill the cycles the first one loses
// to the round-robin merge).
module tb_em_affine_full;
  import em_pkg::*;
  import tb_fp_pkg::*;
  import tb_em_ref_pkg::*;
  localparam int L = em_pkg::MAX_LOG2N;
  localparam int NIMG = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_last;
  fp32_t in_data, out_data;
  img_desc_t in_desc;
  img_id_t out_img;
  logic [L-1:0] out_x, out_y;
  int checks = 0, failures = 0, skipped = 0, n_outside = 0;
  longint cyc = 0;
  longint t_first [NIMG], t_last [NIMG];
  longint n_out = 0, n_first0 = 0, n_last0 = 0;

  int  sz  [NIMG] = '{9, 6, 6, 6};
  real ang [NIMG] = '{0.4, -1.9, 0.05, 2.8};
  real shx [NIMG] = '{3.5, 0.0, -1.25, 0.5};
  real shy [NIMG] = '{-7.0, 2.0, 0.0, 0.5};
  int  got [NIMG] = '{0, 0, 0, 0};

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  em_affine_top dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_desc,
    .out_valid, .out_ready, .out_img, .out_x, .out_y, .out_data, .out_last);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL %s", msg);
  endtask

  always @(posedge clk) if (rst_n && out_valid && out_ready) n_out <= n_out + 1;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    automatic int k = int'(out_img) - 1;
    if (k < 0 || k >= NIMG) fail($sformatf("bad image tag %0d", out_img));
    else begin
      automatic int n = 1 << sz[k];
      real xs, ys, want, have;
      bit in_area, border;
      int x0, y0;
      if (got[k] == 0) t_first[k] = cyc;
      t_last[k] = cyc;
      if (k == 0 && got[k] == 0) n_first0 = n_out;
      if (k == 0) n_last0 = n_out;
      checks++;
      if (int'(out_x) != got[k] % n || int'(out_y) != got[k] / n)
        fail($sformatf("img %0d result %0d at (%0d,%0d)", k + 1, got[k], out_x, out_y));
      got[k]++;
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

  function automatic bit all_done();
    for (int k = 0; k < NIMG; k++)
      if (got[k] != (1 << (2 * sz[k]))) return 0;
    return 1;
  endfunction

  initial begin
    in_desc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NIMG; k++) begin
      automatic int n = 1 << sz[k];
      for (int y = 0; y < n; y++)
        for (int x = 0; x < n; x++) begin
          @(negedge clk);
          in_valid = 1;
          in_data  = to_fp(test_pixel(k + 1, x, y));
          in_desc  = '{angle: to_fp(ang[k]), shift_x: to_fp(shx[k]), shift_y: to_fp(shy[k]),
                       log2n: 4'(sz[k])};
          #1;
          while (!in_ready) begin @(negedge clk); #1; end
          @(posedge clk);
        end
    end
    @(negedge clk);
    in_valid = 0;
    while (!all_done()) @(posedge clk);
    checks += 2;
    if (n_last0 - n_first0 != t_last[0] - t_first[0])
      fail($sformatf("%0d results in %0d cycles", n_last0 - n_first0 + 1, t_last[0] - t_first[0] + 1));
    if (n_outside == 0) fail("no pixel outside the image");
    $display("ET image span: %0d results in %0d cycles; outside=%0d skipped=%0d",
             n_last0 - n_first0 + 1, t_last[0] - t_first[0] + 1, n_outside, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
