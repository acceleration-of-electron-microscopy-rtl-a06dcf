// input_demux: sends the image stream read from DRAM1 alternately to the two
// local memories and keeps track of which memory holds a complete image.
//
// Images are numbered from 1 in arrival order; odd images go to RAM1 (index
// 0) and even images to RAM2 (index 1), as in the accelerator's two-pipeline
// organisation. Each memory is FREE, LOADING or FULL. A FULL memory belongs
// to its pipeline until the pipeline pulses release[b] after its last
// neighbour read; while the memory an image is destined for is FULL the
// stream is held (in_ready low), because the next image for that side cannot
// be written before the previous one has been read out.
// Interface: valid/ready pixel stream in raster order (x fastest); in_desc is
// sampled with the first pixel of each image and its log2n sets the image
// length, 2**(2*log2n) pixels. Per memory: wr_en and the shared wr_x, wr_y,
// wr_data write port; buf_full, buf_desc and buf_img tell the pipeline an
// image is ready and what to do with it. A write happens in the cycle the
// pixel is accepted; buf_full rises on the cycle after the last pixel.
// The FREE/LOADING/FULL bookkeeping is this design's own choice.
module input_demux
  import em_pkg::*;
#(
  parameter int unsigned LOG2N = em_pkg::MAX_LOG2N
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  fp32_t            in_data,
  input  img_desc_t        in_desc,
  output logic [1:0]       wr_en,
  output logic [LOG2N-1:0] wr_x,
  output logic [LOG2N-1:0] wr_y,
  output fp32_t            wr_data,
  output logic [1:0]       buf_full,
  output img_desc_t        buf_desc [2],
  output img_id_t          buf_img  [2],
  input  logic [1:0]       release_buf
);

  typedef enum logic [1:0] {B_FREE, B_LOADING, B_FULL} buf_state_t;

  buf_state_t       bstate [2];
  img_id_t          img_cnt;
  logic             sel;
  logic [LOG2N-1:0] px, py, nmask;
  logic [3:0]       log2n;
  logic             accept, last;

  assign sel      = ~img_cnt[0];                 // odd -> 0 (RAM1), even -> 1
  assign in_ready = (bstate[sel] != B_FULL);
  assign accept   = in_valid && in_ready;
  assign log2n    = (bstate[sel] == B_FREE) ? in_desc.log2n : buf_desc[sel].log2n;
  assign nmask    = LOG2N'((32'd1 << log2n) - 32'd1);
  assign last     = (px == nmask) && (py == nmask);

  assign wr_en    = accept ? (sel ? 2'b10 : 2'b01) : 2'b00;
  assign wr_x     = px;
  assign wr_y     = py;
  assign wr_data  = in_data;

  for (genvar b = 0; b < 2; b++) begin : g_full
    assign buf_full[b] = (bstate[b] == B_FULL);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bstate[0]   <= B_FREE;
      bstate[1]   <= B_FREE;
      buf_desc[0] <= '0;
      buf_desc[1] <= '0;
      buf_img[0]  <= '0;
      buf_img[1]  <= '0;
      img_cnt     <= img_id_t'(1);
      px          <= '0;
      py          <= '0;
    end else begin
      for (int b = 0; b < 2; b++)
        if (release_buf[b] && bstate[b] == B_FULL)
          bstate[b] <= B_FREE;
      if (accept) begin
        if (bstate[sel] == B_FREE) begin
          buf_desc[sel] <= in_desc;
          bstate[sel]   <= B_LOADING;
        end
        if (last) begin
          bstate[sel]  <= B_FULL;
          buf_img[sel] <= img_cnt;
          img_cnt      <= img_cnt + img_id_t'(1);
          px           <= '0;
          py           <= '0;
        end else if (px == nmask) begin
          px <= '0;
          py <= py + LOG2N'(1);
        end else begin
          px <= px + LOG2N'(1);
        end
      end
    end
  end

  // nothing is written into a memory its pipeline still owns
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_en & buf_full) == 2'b00);
  // a pipeline only releases a memory it owns
  for (genvar b = 0; b < 2; b++) begin : g_rel_rule
    a_release_full: assert property (@(posedge clk) disable iff (!rst_n)
      release_buf[b] |-> buf_full[b]);
  end

endmodule
