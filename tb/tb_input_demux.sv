// tb_input_demux: streams six images of mixed sizes with random gaps into the
// demultiplexer. A scoreboard checks that every pixel is written, once, to
// RAM1 for odd and RAM2 for even images at its raster position; that
// buf_full rises after the last pixel with the right image number and
// descriptor; that nothing is written into a full memory; and that the
// stream is held (in_ready low) while the target memory waits for release.
module tb_input_demux;
  import em_pkg::*;
  localparam int L = 4;
  localparam int NIMG = 6;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  fp32_t in_data;
  img_desc_t in_desc;
  logic [1:0] wr_en, buf_full, release_buf = 0;
  logic [L-1:0] wr_x, wr_y;
  fp32_t wr_data;
  img_desc_t buf_desc [2];
  img_id_t buf_img [2];
  int checks = 0, failures = 0, stalls = 0;
  int sizes [NIMG] = '{2, 3, 1, 4, 2, 2};

  always #5 clk = ~clk;

  input_demux #(.LOG2N(L)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .in_desc,
    .wr_en, .wr_x, .wr_y, .wr_data, .buf_full, .buf_desc, .buf_img, .release_buf);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fp32_t pixval(int img, int x, int y);
    return 32'(img * 65536 + y * 256 + x);
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  // source
  initial begin
    in_desc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NIMG; k++) begin
      automatic int n = 1 << sizes[k];
      for (int y = 0; y < n; y++)
        for (int x = 0; x < n; x++) begin
          @(negedge clk);
          while ($urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1;
          in_data  = pixval(k + 1, x, y);
          in_desc  = '{angle: 32'(k), shift_x: 32'(k + 1), shift_y: 32'd0, log2n: 4'(sizes[k])};
          #1;
          while (!in_ready) begin stalls++; @(negedge clk); #1; end
          @(posedge clk);
        end
    end
    @(negedge clk);
    in_valid = 0;
  end

  // consumers: release a full memory after a random delay
  for (genvar b = 0; b < 2; b++) begin : g_rel
    initial begin
      wait (rst_n);
      forever begin
        @(posedge clk);
        if (buf_full[b]) begin
          repeat ($urandom % 150 + 1) @(posedge clk);
          @(negedge clk) release_buf[b] = 1;
          @(negedge clk) release_buf[b] = 0;
          @(posedge clk);
        end
      end
    end
  end

  // scoreboard
  int exp_img = 1, exp_x = 0, exp_y = 0, done_imgs = 0;
  logic [1:0] full_q = 0;
  always @(posedge clk) if (rst_n) begin
    full_q <= buf_full;
    if (|(wr_en & buf_full)) fail("write into a full memory");
    if (wr_en != 0) begin
      automatic int b = (exp_img % 2 == 1) ? 0 : 1;
      automatic int n = 1 << sizes[exp_img - 1];
      checks++;
      if (wr_en != 2'(1 << b) || wr_x != L'(exp_x) || wr_y != L'(exp_y) ||
          wr_data != pixval(exp_img, exp_x, exp_y))
        fail($sformatf("write img %0d (%0d,%0d): en=%b x=%0d y=%0d d=%h", exp_img, exp_x, exp_y,
                       wr_en, wr_x, wr_y, wr_data));
      if (exp_x == n - 1) begin
        exp_x = 0;
        if (exp_y == n - 1) begin exp_y = 0; exp_img++; end
        else exp_y++;
      end else exp_x++;
    end
    for (int b = 0; b < 2; b++)
      if (buf_full[b] && !full_q[b]) begin
        automatic int k = int'(buf_img[b]);
        checks++;
        done_imgs++;
        if (k < 1 || k > NIMG || (k % 2 == 1) != (b == 0) ||
            buf_desc[b].shift_x != 32'(k) || buf_desc[b].log2n != 4'(sizes[k - 1]))
          fail($sformatf("buf_full[%0d] img %0d", b, k));
      end
  end

  initial begin
    wait (done_imgs == NIMG);
    repeat (5) @(posedge clk);
    checks++;
    if (exp_img != NIMG + 1) fail("not all pixels written");
    checks++;
    if (stalls == 0) fail("stream was never held");
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
