// tb_cordic_sincos: drives angles across [-pi, pi] (all four quadrants, the
// folding boundaries and random values) into the CORDIC and compares cos/sin
// with $cos/$sin within 2e-7. Also checks the ITER+2 cycle latency from start
// to done.
module tb_cordic_sincos;
  localparam int ITER = 28;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic signed [31:0] theta, cos_q, sin_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cordic_sincos #(.ITER(ITER)) dut (.clk, .rst_n, .start, .theta, .busy, .done, .cos_q, .sin_q);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(real ang);
    int cyc;
    real c, s;
    @(negedge clk);
    theta = 32'(longint'($floor(ang * 536870912.0)));
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    c = real'(cos_q) / 1073741824.0;
    s = real'(sin_q) / 1073741824.0;
    checks += 3;
    if (cyc != ITER + 2) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
    if ((c - $cos(ang)) > 2e-7 || ($cos(ang) - c) > 2e-7) begin
      failures++;
      if (failures < 10) $display("FAIL cos(%f) = %f expected %f", ang, c, $cos(ang));
    end
    if ((s - $sin(ang)) > 2e-7 || ($sin(ang) - s) > 2e-7) begin
      failures++;
      if (failures < 10) $display("FAIL sin(%f) = %f expected %f", ang, s, $sin(ang));
    end
  endtask

  initial begin
    theta = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0.0);
    run(PI / 6.0);
    run(PI / 2.0 - 1e-6);
    run(PI / 2.0 + 1e-3);
    run(-PI / 2.0 - 1e-3);
    run(3.0);
    run(-3.1);
    run(PI - 1e-6);
    run(-PI + 1e-6);
    for (int i = 0; i < 300; i++)
      run((real'($urandom % 2000000) / 1000000.0 - 1.0) * (PI - 1e-6));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
