// tb_fp_mul: checks the single-precision multiplier against products formed
// in double precision (exact for two singles) and rounded to single, plus
// zero, overflow and underflow cases. Bit-exact comparison.
module tb_fp_mul;
  import tb_fp_pkg::*;

  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  fp_mul dut (.a, .b, .y);

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic [31:0] want);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", ta, tb_, y, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3f800000, 32'h40490fdb, 32'h40490fdb);  // 1 * pi
    check(32'h40000000, 32'h40400000, 32'h40c00000);  // 2 * 3 = 6
    check(32'hbf000000, 32'h40800000, 32'hc0000000);  // -0.5 * 4 = -2
    check(32'h00000000, 32'h40800000, 32'h00000000);  // 0 * 4
    check(32'h7f000000, 32'h7f000000, 32'h7f800000);  // overflow
    check(32'h00800000, 32'h00800000, 32'h00000000);  // underflow
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] ra, rb;
      ra = rand_fp(90, 160);
      rb = rand_fp(90, 160);
      check(ra, rb, to_fp(fp_to_real(ra) * fp_to_real(rb)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
