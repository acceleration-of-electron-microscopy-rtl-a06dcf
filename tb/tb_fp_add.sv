// tb_fp_add: checks the single-precision adder/subtractor. For operands whose
// exponents differ by less than 29 the double-precision sum is exact, so the
// result must match bit for bit; wider gaps are compared within one unit in
// the last place. Also covers exact cancellation, zero operands and overflow.
module tb_fp_add;
  import tb_fp_pkg::*;

  logic [31:0] a, b, y;
  logic        sub;
  int checks = 0, failures = 0;

  fp_add dut (.a, .b, .sub, .y);

  task automatic check(logic [31:0] ta, logic [31:0] tb_, logic ts, logic [31:0] want, int tol);
    a = ta; b = tb_; sub = ts;
    #1;
    checks++;
    if (ulp_diff(y, want) > tol || (tol == 0 && y !== want)) begin
      failures++;
      if (failures < 10) $display("FAIL %h %s %h = %h, expected %h", ta, ts ? "-" : "+", tb_, y, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3f800000, 32'h3f800000, 1'b0, 32'h40000000, 0);  // 1 + 1
    check(32'h3f800000, 32'h3f800000, 1'b1, 32'h00000000, 0);  // 1 - 1
    check(32'h40400000, 32'h3f800000, 1'b1, 32'h40000000, 0);  // 3 - 1
    check(32'h00000000, 32'hc0a00000, 1'b0, 32'hc0a00000, 0);  // 0 + -5
    check(32'h3f800000, 32'h00000000, 1'b1, 32'h3f800000, 0);  // 1 - 0
    check(32'h7f7fffff, 32'h7f7fffff, 1'b0, 32'h7f800000, 0);  // overflow
    check(32'h3f800001, 32'h3f800000, 1'b1, 32'h34000000, 0);  // 2^-23
    for (int i = 0; i < 30000; i++) begin
      logic [31:0] ra, rb;
      logic        rs;
      int          gap;
      ra = rand_fp(100, 150);
      // half the cases with close exponents to exercise cancellation
      if (i % 2 == 0) rb = {1'($urandom), 8'(int'(ra[30:23]) - 1 + int'($urandom % 3)), 23'($urandom)};
      else            rb = rand_fp(100, 150);
      rs  = 1'($urandom);
      gap = int'(ra[30:23]) - int'(rb[30:23]);
      if (gap < 0) gap = -gap;
      check(ra, rb, rs,
            to_fp(rs ? fp_to_real(ra) - fp_to_real(rb) : fp_to_real(ra) + fp_to_real(rb)),
            (gap < 29) ? 0 : 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
