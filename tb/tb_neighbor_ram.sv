// tb_neighbor_ram: fills the banked memory with a known pattern (pixel value
// = y*N + x as a float), then reads every neighbourhood of an 8x8 image and
// random neighbourhoods of the full grid, checking all four outputs one cycle
// after the read and that they hold while rd_en is low.
module tb_neighbor_ram;
  import tb_fp_pkg::*;
  localparam int L = 5;
  localparam int N = 1 << L;

  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [L-1:0] wr_x, wr_y, rd_x, rd_y;
  logic [31:0]  wr_data, p00, p10, p01, p11;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  neighbor_ram #(.LOG2N(L)) dut (.clk, .wr_en, .wr_x, .wr_y, .wr_data, .rd_en, .rd_x, .rd_y,
                                 .p00, .p10, .p01, .p11);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pix(int x, int y);
    return to_fp(real'(y * N + x));
  endfunction

  task automatic chk(logic [31:0] got, logic [31:0] want, string nm);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h expected %h", nm, got, want);
    end
  endtask

  task automatic rd(int x, int y);
    @(negedge clk);
    rd_en = 1; rd_x = L'(x); rd_y = L'(y);
    @(negedge clk);
    rd_en = 0;
    chk(p00, pix(x, y), "p00");
    chk(p10, pix(x + 1, y), "p10");
    chk(p01, pix(x, y + 1), "p01");
    chk(p11, pix(x + 1, y + 1), "p11");
  endtask

  initial begin
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        @(negedge clk);
        wr_en = 1; wr_x = L'(x); wr_y = L'(y); wr_data = pix(x, y);
      end
    @(negedge clk);
    wr_en = 0;
    for (int y = 0; y < 7; y++)
      for (int x = 0; x < 7; x++)
        rd(x, y);
    for (int i = 0; i < 500; i++)
      rd(int'($urandom % (N - 1)), int'($urandom % (N - 1)));
    // outputs hold while rd_en is low
    rd(3, 4);
    @(negedge clk); rd_x = 0; rd_y = 0;
    @(negedge clk);
    chk(p11, pix(4, 5), "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
