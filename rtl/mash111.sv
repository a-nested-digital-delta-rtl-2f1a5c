// mash111: third-order MASH 1-1-1 digital delta-sigma modulator.
//
// Three first-order accumulators (efm1) in cascade: the first takes the
// input word x (plus the carry input cin), each later stage takes the
// N-bit residue of the stage before it. The three carry bits are combined
// by the noise cancellation network (mash_ncn), giving
//   Y = (X + CIN)/2^N + (1 - z^-1)^3 * E3 / 2^N,
// a signed output in -3..4 whose mean is (x + cin)/2^N. Hardware is 3N
// flip-flops and 3N full adders in the accumulators plus the network.
//
// The carry input is this design's addition to the textbook MASH: the
// nested architecture drives it with the output of a first-order modulator
// on the input's low bits. Tie it to 0 for a conventional MASH 1-1-1.
//
// Timing: the stages are not pipelined; y[n] is combinational in x[n],
// cin[n] and the state, which updates on the rising clock edge.
// Reset (asynchronous, active low) clears every register.
module mash111
  import ddsm_pkg::*;
#(
  parameter int unsigned N = 14
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] x,
  input  logic         cin,
  output ddsm_out_t    y
);

  logic         c1, c2, c3;
  logic [N-1:0] e1, e2, e3_unused;

  efm1 #(.N(N)) u_stage1 (.clk, .rst_n, .x(x),  .cin(cin),  .y(c1), .e(e1));
  efm1 #(.N(N)) u_stage2 (.clk, .rst_n, .x(e1), .cin(1'b0), .y(c2), .e(e2));
  efm1 #(.N(N)) u_stage3 (.clk, .rst_n, .x(e2), .cin(1'b0), .y(c3), .e(e3_unused));

  mash_ncn u_ncn (.clk, .rst_n, .y1(c1), .y2(c2), .y3(c3), .y(y));

endmodule
