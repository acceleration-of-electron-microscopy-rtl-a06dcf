// em_affine_top: FPGA accelerator for the rotation and translation of electron
// microscopy images.
//
// Original images arrive from the board memory DRAM1 as a pixel stream. The
// input demultiplexer writes odd images into local memory RAM1 and even
// images into RAM2; each memory is organised so that the four neighbours of
// any point are read in one cycle. Each memory has its own pipeline, which
// computes for every output pixel where it falls in the original image and
// interpolates it from those four neighbours. The output multiplexer merges
// both result streams towards the board memory DRAM2. With two memories and
// two pipelines, loading one image overlaps processing the previous one, so
// DRAM1 and DRAM2 can both be kept busy: after the first image, one pixel in
// and one pixel out per cycle. The two-bank/two-pipeline organisation, the
// odd/even split and the overlap follow the accelerator's description; the
// stream protocol, the tags on the output pixels and the sizes of the
// internal words are this design's own.
// Interface: clk/rst_n (active-low asynchronous reset). DRAM1 side: valid/
// ready stream of single-precision pixels in raster order, with the image
// descriptor (angle, shift, size) held while the first pixel of each image is
// offered. DRAM2 side: valid/ready stream of transformed pixels, each with its
// image number (1, 2, ... in input order) and (x, y) position; out_last marks
// an image's final pixel. The DRAM chips and their controllers are outside.
module em_affine_top
  import em_pkg::*;
#(
  parameter int unsigned LOG2N = em_pkg::MAX_LOG2N,
  parameter int unsigned ITER  = 28
) (
  input  logic             clk,
  input  logic             rst_n,
  // from DRAM1
  input  logic             in_valid,
  output logic             in_ready,
  input  fp32_t            in_data,
  input  img_desc_t        in_desc,
  // to DRAM2
  output logic             out_valid,
  input  logic             out_ready,
  output img_id_t          out_img,
  output logic [LOG2N-1:0] out_x,
  output logic [LOG2N-1:0] out_y,
  output fp32_t            out_data,
  output logic             out_last
);

  logic [1:0]       wr_en, buf_full, release_buf;
  logic [LOG2N-1:0] wr_x, wr_y;
  fp32_t            wr_data;
  img_desc_t        buf_desc [2];
  img_id_t          buf_img  [2];

  logic [1:0]       pv, pr, pl;
  img_id_t          p_img  [2];
  logic [LOG2N-1:0] p_x    [2];
  logic [LOG2N-1:0] p_y    [2];
  fp32_t            p_data [2];

  input_demux #(.LOG2N(LOG2N)) u_demux (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data, .in_desc,
    .wr_en, .wr_x, .wr_y, .wr_data,
    .buf_full, .buf_desc, .buf_img, .release_buf
  );

  for (genvar b = 0; b < 2; b++) begin : g_lane
    logic             rd_en;
    logic [LOG2N-1:0] rd_x, rd_y;
    fp32_t            q00, q10, q01, q11;

    neighbor_ram #(.LOG2N(LOG2N)) u_ram (
      .clk,
      .wr_en(wr_en[b]), .wr_x, .wr_y, .wr_data,
      .rd_en, .rd_x, .rd_y,
      .p00(q00), .p10(q10), .p01(q01), .p11(q11)
    );

    affine_pipeline #(.LOG2N(LOG2N), .ITER(ITER)) u_pipe (
      .clk, .rst_n,
      .buf_full(buf_full[b]), .desc(buf_desc[b]), .img_id(buf_img[b]),
      .buf_release(release_buf[b]),
      .rd_en, .rd_x, .rd_y,
      .p00(q00), .p10(q10), .p01(q01), .p11(q11),
      .out_valid(pv[b]), .out_ready(pr[b]), .out_img(p_img[b]),
      .out_x(p_x[b]), .out_y(p_y[b]), .out_data(p_data[b]), .out_last(pl[b])
    );
  end

  output_mux #(.LOG2N(LOG2N)) u_omux (
    .clk, .rst_n,
    .in_valid(pv), .in_ready(pr), .in_img(p_img), .in_x(p_x), .in_y(p_y),
    .in_data(p_data), .in_last(pl),
    .out_valid, .out_ready, .out_img, .out_x, .out_y, .out_data, .out_last
  );

endmodule
