// mash_ncn: noise cancellation network of a MASH 1-1-1 modulator.
//
// Combines the three one-bit stage outputs as
//   y[n] = y1[n] + (1 - z^-1) * (y2[n] + (1 - z^-1) * y3[n])
// so that the quantization noise of stages 1 and 2 cancels and only the
// third stage's error remains, third-order shaped. It is built as two
// nested differentiators: t = y2 + y3 - y3[n-1] (range -1..2, three bits)
// and y = y1 + t - t[n-1] (range -3..4, four bits). The state is the
// delayed y3 (1 flip-flop) and the delayed t (3 flip-flops), the 4
// flip-flops of the cost model for this network; the grouping of the sums
// is this design's choice.
//
// Timing: y is combinational in y1..y3 and the state; the state updates on
// the rising clock edge and is cleared by the asynchronous active-low reset.
module mash_ncn
  import ddsm_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      y1,
  input  logic      y2,
  input  logic      y3,
  output ddsm_out_t y
);

  logic             y3_q;
  logic signed [2:0] t, t_q;

  always_comb begin
    t = $signed({2'b00, y2}) + $signed({2'b00, y3}) - $signed({2'b00, y3_q});
    y = $signed({3'b000, y1}) + ddsm_out_t'(t) - ddsm_out_t'(t_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y3_q <= 1'b0;
      t_q  <= '0;
    end else begin
      y3_q <= y3;
      t_q  <= t;
    end
  end

endmodule
