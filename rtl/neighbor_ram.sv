// neighbor_ram: local image memory that delivers the four neighbours of a
// point in one clock cycle.
//
// Bilinear interpolation needs the pixels (x0,y0), (x0+1,y0), (x0,y0+1) and
// (x0+1,y0+1) for every output pixel. The memory sorts the image so that
// those four always sit in different banks: pixel (x,y) is stored in bank
// {y[0],x[0]} at address {y>>1, x>>1}. Whatever the parity of (x0,y0), each
// bank holds exactly one of the four, at column (x0 + (x0[0] != bx)) >> 1 and
// row (y0 + (y0[0] != by)) >> 1, so four single-port-read memories serve one
// neighbourhood per cycle. The bank outputs are registered and routed back to
// p00..p11 by the registered parities of (x0,y0). The banking scheme is this
// design's own way of providing the four-at-a-time access the accelerator
// calls for. The address grid is always 2**MAX_LOG2N wide; smaller images use
// its upper-left corner.
// Interface: one write port (wr_en, wr_x, wr_y, wr_data), one pixel per cycle.
// Read port: rd_en with (rd_x, rd_y) = (x0, y0), x0 and y0 at most
// 2**MAX_LOG2N - 2; p00 (x0,y0), p10 (x0+1,y0), p01 (x0,y0+1) and
// p11 (x0+1,y0+1) appear on the next cycle and hold while rd_en is low.
module neighbor_ram
  import em_pkg::*;
#(
  parameter int unsigned LOG2N = em_pkg::MAX_LOG2N
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [LOG2N-1:0] wr_x,
  input  logic [LOG2N-1:0] wr_y,
  input  fp32_t            wr_data,
  input  logic             rd_en,
  input  logic [LOG2N-1:0] rd_x,
  input  logic [LOG2N-1:0] rd_y,
  output fp32_t            p00,
  output fp32_t            p10,
  output fp32_t            p01,
  output fp32_t            p11
);

  localparam int unsigned HALF  = LOG2N - 1;
  localparam int unsigned DEPTH = 1 << (2 * HALF);

  fp32_t bank_q [4];
  logic  par_x, par_y;

  for (genvar b = 0; b < 4; b++) begin : g_bank
    localparam logic BX = b[0];
    localparam logic BY = b[1];
    fp32_t mem [DEPTH];
    logic [LOG2N-1:0] cx, cy;
    logic [2*HALF-1:0] waddr, raddr;

    always_comb begin
      cx    = rd_x + LOG2N'(rd_x[0] != BX);
      cy    = rd_y + LOG2N'(rd_y[0] != BY);
      raddr = {cy[LOG2N-1:1], cx[LOG2N-1:1]};
      waddr = {wr_y[LOG2N-1:1], wr_x[LOG2N-1:1]};
    end

    always_ff @(posedge clk) begin
      if (wr_en && wr_x[0] == BX && wr_y[0] == BY)
        mem[waddr] <= wr_data;
      if (rd_en)
        bank_q[b] <= mem[raddr];
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      par_x <= rd_x[0];
      par_y <= rd_y[0];
    end
  end

  // bank index of the neighbour at offset (dx,dy) is {y0[0]^dy, x0[0]^dx}
  assign p00 = bank_q[{par_y,        par_x}];
  assign p10 = bank_q[{par_y,        ~par_x}];
  assign p01 = bank_q[{~par_y,       par_x}];
  assign p11 = bank_q[{~par_y,       ~par_x}];

endmodule
