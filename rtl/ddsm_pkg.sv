// ddsm_pkg: types and constants shared by the delta-sigma modulator blocks.
//
// The MASH 1-1-1 output y[n] = y1 + (1-z^-1) y2 + (1-z^-1)^2 y3 with one-bit
// yi takes the values -3..4, so it is carried as a 4-bit two's complement
// number (ddsm_out_t).
//
// nested_msb_bits() is the wordlength rule of the nested 1-3 architecture:
// for an N-bit input, the third-order part needs M = ceil(0.8*N - 2.12)
// bits so that the first tone of the first-order part's shaped noise lies
// below the third-order envelope (4*N_LSB - N_MSB <= 10.6). It is evaluated
// in integer arithmetic as ceil((80*N - 212) / 100). The defaults (N = 20,
// N_MSB = 14, N_LSB = 6) are the design example's.
package ddsm_pkg;

  localparam int unsigned OUT_W = 4;
  typedef logic signed [OUT_W-1:0] ddsm_out_t;

  // Wordlengths of the nested 1-3 design example (equivalent to a 19-bit
  // MASH 1-1-1, hence 19 + 1 = 20 input bits).
  localparam int unsigned NESTED_N_MSB = 14;
  localparam int unsigned NESTED_N_LSB = 6;

  // Smallest M with M >= 0.8*N - 2.12.
  function automatic int unsigned nested_msb_bits(input int unsigned n);
    int num;
    num = 80 * int'(n) - 212;
    if (num <= 0) return 1;
    return unsigned'((num + 99) / 100);
  endfunction

  // Masking condition 4*N_LSB - N_MSB <= 10.6, scaled by 10.
  function automatic bit masking_ok(input int unsigned n_msb,
                                    input int unsigned n_lsb);
    return (40 * int'(n_lsb) - 10 * int'(n_msb)) <= 106;
  endfunction

endpackage
