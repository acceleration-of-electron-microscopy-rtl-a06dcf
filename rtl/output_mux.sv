// output_mux: merges the result streams of the two pipelines into the single
// stream written to DRAM2.
//
// Both pipelines deliver one pixel per cycle when running, and their output
// periods overlap while one image drains and the next starts. The mux grants
// one pipeline per cycle with a round-robin priority: when both present a
// pixel, the one not served last goes first and the other is held (its
// ready is low, which stalls that whole pipeline for a cycle). Each pixel
// carries its image number and position, so DRAM2 can be written in any
// interleaving. While the sink holds a result (out_valid && !out_ready) the
// grant is locked, so the offered result stays the same until it is taken.
// The round-robin policy and the lock are this design's own choices.
// Interface: two valid/ready inputs, one valid/ready output; the output is a
// combinational selection of an input (no added latency).
module output_mux
  import em_pkg::*;
#(
  parameter int unsigned LOG2N = em_pkg::MAX_LOG2N
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       in_valid,
  output logic [1:0]       in_ready,
  input  img_id_t          in_img  [2],
  input  logic [LOG2N-1:0] in_x    [2],
  input  logic [LOG2N-1:0] in_y    [2],
  input  fp32_t            in_data [2],
  input  logic [1:0]       in_last,
  output logic             out_valid,
  input  logic             out_ready,
  output img_id_t          out_img,
  output logic [LOG2N-1:0] out_x,
  output logic [LOG2N-1:0] out_y,
  output fp32_t            out_data,
  output logic             out_last
);

  logic prio;     // input that wins a tie
  logic grant;    // selected input
  logic held;     // last cycle offered a result that was not taken
  logic held_g;   // grant of that cycle

  always_comb begin
    if (held)                            grant = held_g;
    else if (in_valid[0] && in_valid[1]) grant = prio;
    else                                 grant = in_valid[1];
  end

  assign out_valid = |in_valid;
  assign out_img   = in_img[grant];
  assign out_x     = in_x[grant];
  assign out_y     = in_y[grant];
  assign out_data  = in_data[grant];
  assign out_last  = in_last[grant];
  assign in_ready  = out_ready ? (grant ? 2'b10 : 2'b01) : 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prio   <= 1'b0;
      held   <= 1'b0;
      held_g <= 1'b0;
    end else begin
      held   <= out_valid && !out_ready;
      held_g <= grant;
      if (out_valid && out_ready)
        prio <= ~grant;
    end
  end

  // a result offered but not taken stays offered, unchanged
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable({out_img, out_x, out_y, out_data, out_last}));
  // a held input keeps its result (the pipelines guarantee this)
  for (genvar i = 0; i < 2; i++) begin : g_in_rule
    a_in_hold: assert property (@(posedge clk) disable iff (!rst_n)
      in_valid[i] && !in_ready[i] |=> in_valid[i] && $stable({in_img[i], in_x[i], in_y[i], in_data[i]}));
  end

endmodule
