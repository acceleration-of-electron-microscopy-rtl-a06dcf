// cordic_sincos: iterative CORDIC computing cos(theta) and sin(theta).
//
// Each image's rotation needs cos(beta) and sin(beta) once, before its pixels
// stream through the pipeline, so a sequential CORDIC in rotation mode is used:
// one micro-rotation per clock cycle, ITER cycles per angle. theta is a signed
// fixed-point angle in radians with 29 fraction bits (range [-pi, pi]). Angles
// beyond +-pi/2 are first folded by -+pi with both results negated, because
// the CORDIC iterations converge only within about +-99.7 degrees. The vector
// starts at (K, 0), K = prod 1/sqrt(1 + 2**-2i) = 0.60725..., so no gain
// correction is needed at the end. Results have 30 fraction bits.
// The angle table holds round(atan(2**-i) * 2**29).
// Interface: pulse start with theta; done is high ITER + 2 cycles after the
// cycle in which start is high (one to load, ITER steps, one to fold back), with
// cos_q/sin_q valid and held until the next start. Whether the core is
// sequential or unrolled, its word length and its angle format are this
// design's own choices; the accelerator only calls for "a CORDIC core".
module cordic_sincos #(
  parameter int unsigned ITER = 28
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic signed [31:0] theta,     // Q3.29 radians
  output logic               busy,
  output logic               done,
  output logic signed [31:0] cos_q,     // Q2.30
  output logic signed [31:0] sin_q      // Q2.30
);

  localparam logic signed [31:0] PI_Q29   = 32'sd1686629713;
  localparam logic signed [31:0] PIH_Q29  = 32'sd843314857;
  localparam logic signed [33:0] K_Q30    = 34'sd652032874;

  function automatic logic signed [31:0] atan_tab(int i);
    case (i)
      0: return 32'sd421657428;
      1: return 32'sd248918915;
      2: return 32'sd131521918;
      3: return 32'sd66762579;
      4: return 32'sd33510843;
      5: return 32'sd16771758;
      6: return 32'sd8387925;
      7: return 32'sd4194219;
      8: return 32'sd2097141;
      9: return 32'sd1048575;
      default: return (i < 30) ? (32'sd1 <<< (29 - i)) : 32'sd0;
    endcase
  endfunction

  logic signed [33:0] x, y;
  logic signed [31:0] z;
  logic               negate;
  logic [5:0]         step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x      <= '0;
      y      <= '0;
      z      <= '0;
      negate <= 1'b0;
      step   <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      cos_q  <= '0;
      sin_q  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        x    <= K_Q30;
        y    <= '0;
        step <= '0;
        busy <= 1'b1;
        if (theta > PIH_Q29) begin
          z      <= theta - PI_Q29;
          negate <= 1'b1;
        end else if (theta < -PIH_Q29) begin
          z      <= theta + PI_Q29;
          negate <= 1'b1;
        end else begin
          z      <= theta;
          negate <= 1'b0;
        end
      end else if (busy) begin
        if (step == 6'(ITER)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          cos_q <= negate ? 32'(-x) : 32'(x);
          sin_q <= negate ? 32'(-y) : 32'(y);
        end else begin
          if (z >= 0) begin
            x <= x - (y >>> step);
            y <= y + (x >>> step);
            z <= z - atan_tab(int'(step));
          end else begin
            x <= x + (y >>> step);
            y <= y - (x >>> step);
            z <= z + atan_tab(int'(step));
          end
          step <= step + 6'd1;
        end
      end
    end
  end

endmodule
