// nested13_ddsm: nested 1-3 digital delta-sigma modulator for a
// fractional-N frequency divider.
//
// The N-bit fractional word X = X_MSB * 2^N_LSB + X_LSB is split in two.
// The N_LSB low bits go to a first-order modulator (efm1); its one-bit
// output is added to the N_MSB high bits through the carry input of the
// first accumulator of a third-order MASH 1-1-1 (mash111), so the addition
// costs no adder. The output
//   Y = X/2^N + (1-z^-1) eQ / 2^N + (1-z^-1)^3 E3 / 2^N_MSB
// has mean X/2^N; the first-order term is masked below the third-order one
// when 4*N_LSB - N_MSB <= 10.6. Cost: N_LSB + 3*N_MSB flip-flops and full
// adders plus the 4-flip-flop noise cancellation network.
//
// Defaults are the design example's N_MSB = 14, N_LSB = 6 (N = 20), which
// has the same 2^20-cycle output period as a 19-bit MASH 1-1-1 with odd
// input. The elaboration check rejects wordlengths that break the masking
// rule (ddsm_pkg::masking_ok).
//
// Interface: x is sampled every clock; y is the signed (-3..4) offset to
// add to the integer division ratio. y[n] is combinational in x[n] and the
// state (no pipeline); all state updates on the rising edge of clk and is
// cleared by the asynchronous active-low rst_n (this design's choice).
module nested13_ddsm
  import ddsm_pkg::*;
#(
  parameter int unsigned N_MSB = NESTED_N_MSB,
  parameter int unsigned N_LSB = NESTED_N_LSB
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N_MSB+N_LSB-1:0] x,
  output ddsm_out_t              y
);

  if (!masking_ok(N_MSB, N_LSB)) begin : g_bad_wordlength
    $error("nested13_ddsm: 4*N_LSB - N_MSB exceeds 10.6; first-order noise not masked");
  end

  logic [N_MSB-1:0] x_msb;
  logic [N_LSB-1:0] x_lsb;
  logic             y_lsb;
  logic [N_LSB-1:0] e_lsb_unused;

  assign x_msb = x[N_MSB+N_LSB-1:N_LSB];
  assign x_lsb = x[N_LSB-1:0];

  efm1 #(.N(N_LSB)) u_ddsm1 (
    .clk, .rst_n, .x(x_lsb), .cin(1'b0), .y(y_lsb), .e(e_lsb_unused)
  );

  mash111 #(.N(N_MSB)) u_ddsm3 (
    .clk, .rst_n, .x(x_msb), .cin(y_lsb), .y(y)
  );

endmodule
