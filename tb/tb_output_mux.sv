// tb_output_mux: two random pixel sources feed the output multiplexer while
// the sink applies random back-pressure. Checks that every pixel of each
// source comes out exactly once and in its source's order, that a held input
// keeps its pixel, that contested cycles alternate between the sources, and
// that nothing is lost while out_ready is low.
module tb_output_mux;
  import em_pkg::*;
  localparam int L = 4;
  localparam int NPIX = 400;

  logic clk = 0, rst_n = 0;
  logic [1:0] in_valid = 0, in_ready, in_last = 0;
  img_id_t in_img [2];
  logic [L-1:0] in_x [2], in_y [2];
  fp32_t in_data [2];
  logic out_valid, out_ready = 0, out_last;
  img_id_t out_img;
  logic [L-1:0] out_x, out_y;
  fp32_t out_data;
  int checks = 0, failures = 0, contested = 0, alternations = 0;
  int sent [2] = '{0, 0};
  int recv [2] = '{0, 0};
  int last_grant = -1;

  always #5 clk = ~clk;

  output_mux #(.LOG2N(L)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_img, .in_x, .in_y,
    .in_data, .in_last, .out_valid, .out_ready, .out_img, .out_x, .out_y, .out_data, .out_last);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar s = 0; s < 2; s++) begin : g_src
    always_comb begin
      in_img[s]  = img_id_t'(s + 1);
      in_x[s]    = L'(sent[s]);
      in_y[s]    = L'(sent[s] >> L);
      in_data[s] = 32'(s * 100000 + sent[s]);
    end
    bit pending = 0;   // offered at the last edge and not taken
    always @(posedge clk) if (rst_n) begin
      if (in_valid[s] && in_ready[s]) sent[s] <= sent[s] + 1;
      pending <= in_valid[s] && !in_ready[s];
    end
    always @(negedge clk) if (rst_n) begin
      if (!pending)   // a held pixel stays offered
        in_valid[s] <= (sent[s] < NPIX) && ($urandom % 4 != 0);
    end
  end

  always @(negedge clk) out_ready <= ($urandom % 5 != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    automatic int s = int'(out_img) - 1;
    checks++;
    if (s < 0 || s > 1 || out_data != 32'(s * 100000 + recv[s])) begin
      failures++;
      if (failures < 10) $display("FAIL got img %0d data %0d", out_img, out_data);
    end else begin
      recv[s]++;
    end
    if (in_valid == 2'b11) begin
      contested++;
      if (last_grant >= 0 && s != last_grant) alternations++;
    end
    last_grant = s;
  end

  initial begin
    in_data[0] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (recv[0] == NPIX && recv[1] == NPIX);
    checks += 2;
    if (contested == 0) begin failures++; $display("FAIL no contention"); end
    if (alternations * 2 < contested) begin
      failures++; $display("FAIL contested=%0d alternations=%0d", contested, alternations);
    end
    $display("contested=%0d alternations=%0d", contested, alternations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
