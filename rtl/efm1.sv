// efm1: first-order error feedback modulator (an N-bit accumulator).
//
// Each cycle the sum v[n] = x[n] + e[n-1] + cin[n] is formed. Its carry out
// (v >= 2^N) is the one-bit quantizer output y[n]; the N low bits are the
// residue e[n], which is registered and fed back, and is also presented on
// port e so that a following stage of a MASH cascade can take it as its
// input. The mean of y is (x + cin)/2^N and its error is first-order shaped.
// The carry input is how the nested architecture adds the first-order
// modulator's bit to the third-order modulator without an extra adder.
//
// Timing: y and e are combinational in x, cin and the stored residue; the
// residue register updates on the rising clock edge. The register (N
// flip-flops) and the N-bit adder are the whole block, as the cost model
// of the architecture assumes. Reset (asynchronous, active low) clears the
// residue to zero; that initial state is this design's choice.
module efm1 #(
  parameter int unsigned N = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] x,
  input  logic         cin,
  output logic         y,
  output logic [N-1:0] e
);

  logic [N-1:0] acc_q;
  logic [N:0]   sum;

  always_comb begin
    sum = {1'b0, x} + {1'b0, acc_q} + {{N{1'b0}}, cin};
    y   = sum[N];
    e   = sum[N-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc_q <= '0;
    else        acc_q <= e;
  end

endmodule
