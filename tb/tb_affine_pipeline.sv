// tb_affine_pipeline: one pipeline with its neighbour memory. Each test image
// is written into the memory, buf_full is raised with a descriptor, and every
// output pixel is compared with the double-precision reference within 1e-4.
// Cases: identity, rotations in all quadrants (including the +-pi/2 fold),
// pure and mixed shifts and a smaller runtime image size. One image runs
// with the sink always ready and checks the timing: first result a fixed
// latency after buf_full, then one pixel per cycle; the others run with
// random back-pressure, which stalls the pipeline. Also checks that
// buf_release pulses exactly once per image and that outside pixels are 0.
module tb_affine_pipeline;
  import em_pkg::*;
  import tb_fp_pkg::*;
  import tb_em_ref_pkg::*;
  localparam int L = 4;
  localparam int ITER = 28;
  localparam int EXP_FIRST = ITER + 15;   // buf_full to first result, see pipeline header

  logic clk = 0, rst_n = 0;
  logic buf_full = 0, buf_release;
  img_desc_t desc;
  img_id_t img_id;
  logic wr_en = 0, rd_en;
  logic [L-1:0] wr_x, wr_y, rd_x, rd_y, out_x, out_y;
  fp32_t wr_data, p00, p10, p01, p11, out_data;
  logic out_valid, out_ready = 1, out_last;
  img_id_t out_img;
  int checks = 0, failures = 0, skipped = 0, stall_cycles = 0, outside = 0, releases = 0;
  longint cyc = 0;
  real img [1 << L][1 << L];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  neighbor_ram #(.LOG2N(L)) u_ram (.clk, .wr_en, .wr_x, .wr_y, .wr_data, .rd_en, .rd_x, .rd_y,
                                   .p00, .p10, .p01, .p11);
  affine_pipeline #(.LOG2N(L), .ITER(ITER)) dut (.clk, .rst_n, .buf_full, .desc, .img_id,
    .buf_release, .rd_en, .rd_x, .rd_y, .p00, .p10, .p01, .p11,
    .out_valid, .out_ready, .out_img, .out_x, .out_y, .out_data, .out_last);

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (buf_release) releases++;
    if (out_valid && !out_ready) stall_cycles++;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL %s", msg);
  endtask

  task automatic run_image(int k, int log2n, real alpha, real sx, real sy, bit backpressure);
    int n = 1 << log2n;
    int got = 0;
    int rel0 = releases;
    longint t_full, t_first = -1, t_last = 0;
    bit done = 0;
    // load the memory
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++) begin
        img[y][x] = test_pixel(k, x, y);
        @(negedge clk);
        wr_en = 1; wr_x = L'(x); wr_y = L'(y); wr_data = to_fp(img[y][x]);
      end
    @(negedge clk);
    wr_en = 0;
    desc = '{angle: to_fp(alpha), shift_x: to_fp(sx), shift_y: to_fp(sy), log2n: 4'(log2n)};
    img_id = img_id_t'(k);
    buf_full = 1;
    @(posedge clk);
    t_full = cyc;
    while (!done) begin
      @(negedge clk);
      if (buf_release) buf_full = 0;
      out_ready = backpressure ? ($urandom % 3 != 0) : 1'b1;
      @(posedge clk);
      if (out_valid && out_ready) begin
        real xs, ys, want, have;
        bit in_area, border;
        int x0, y0;
        if (t_first < 0) t_first = cyc;
        t_last = cyc;
        source_point(log2n, alpha, sx, sy, int'(out_x), int'(out_y), xs, ys, in_area, border);
        have = fp_to_real(out_data);
        if (border) skipped++;
        else begin
          if (in_area) begin
            x0 = corner(xs, log2n);
            y0 = corner(ys, log2n);
            want = bilinear(img[y0][x0], img[y0][x0 + 1], img[y0 + 1][x0], img[y0 + 1][x0 + 1],
                            xs - real'(x0), ys - real'(y0));
          end else begin
            want = 0.0;
            outside++;
          end
          checks++;
          if (have - want > 1e-4 || want - have > 1e-4 || (!in_area && out_data != 0))
            fail($sformatf("img %0d (%0d,%0d) got %f expected %f", k, out_x, out_y, have, want));
        end
        if (out_img != img_id_t'(k) || int'(out_x) != got % n || int'(out_y) != got / n)
          fail($sformatf("img %0d tag/position %0d (%0d,%0d) at result %0d", k, out_img, out_x, out_y, got));
        checks++;
        if (out_last != (got == n * n - 1)) fail("out_last");
        got++;
        if (got == n * n) done = 1;
      end
    end
    out_ready = 1;
    buf_full = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (releases != rel0 + 1) fail($sformatf("img %0d: %0d releases", k, releases - rel0));
    if (!backpressure) begin
      checks += 2;
      if (t_first - t_full != EXP_FIRST)
        fail($sformatf("first result after %0d cycles, expected %0d", t_first - t_full, EXP_FIRST));
      if (t_last - t_first != n * n - 1)
        fail($sformatf("%0d results took %0d cycles", n * n, t_last - t_first + 1));
    end
  endtask

  initial begin
    desc = '0; img_id = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_image(1, L, 0.0, 0.0, 0.0, 0);
    run_image(2, L, 0.5235987756, 1.5, -2.25, 1);
    run_image(3, L, -1.75, 0.0, 0.0, 1);
    run_image(4, L, 2.6, -0.7, 0.3, 1);
    run_image(5, L, 0.0, 3.7, 0.4, 1);
    run_image(6, 3, 1.2, 0.25, 0.0, 0);
    run_image(7, L, 3.14159, 0.0, 0.0, 1);
    checks++;
    if (stall_cycles == 0) fail("no stall happened");
    if (outside == 0) fail("no pixel fell outside");
    $display("checks=%0d skipped=%0d stall_cycles=%0d outside=%0d", checks, skipped, stall_cycles, outside);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
