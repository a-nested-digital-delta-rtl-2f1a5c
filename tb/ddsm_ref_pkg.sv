// ddsm_ref_pkg: cycle-level reference model of the nested 1-3 modulator,
// written from the difference equations rather than from the RTL.
//
// With n_lsb = 0 it is a plain MASH 1-1-1 of n_msb bits whose first
// accumulator also adds an external carry. Each call of step() returns the
// output for the current input and advances the state one clock:
//   q[n]  = floor((xl + s0)/2^L),          s0 <- (xl + s0) mod 2^L
//   ci[n] = q[n] + cin
//   ck[n] = floor((uk + sk)/2^M),           sk <- (uk + sk) mod 2^M
//     with u1 = xm + ci, u2 = new s1, u3 = new s2
//   y[n]  = c1[n] + c2[n] - c2[n-1] + c3[n] - 2 c3[n-1] + c3[n-2]
package ddsm_ref_pkg;

  class nested_ref;
    int unsigned n_msb, n_lsb;
    longint s0, s1, s2, s3;
    int c2_d, c3_d, c3_dd;
    int last_q, last_c1, last_c2, last_c3;

    function new(int unsigned m, int unsigned l);
      n_msb = m;
      n_lsb = l;
      reset();
    endfunction

    function void reset();
      s0 = 0; s1 = 0; s2 = 0; s3 = 0;
      c2_d = 0; c3_d = 0; c3_dd = 0;
    endfunction

    function int step(longint x, int cin);
      longint mm, ml, xm, xl, v;
      int q, c1, c2, c3, y;
      mm = longint'(1) << n_msb;
      ml = longint'(1) << n_lsb;
      xl = (n_lsb == 0) ? 0 : (x % ml);
      xm = (n_lsb == 0) ? x : (x / ml);
      q = 0;
      if (n_lsb != 0) begin
        v = xl + s0; q = int'(v / ml); s0 = v % ml;
      end
      v = xm + s1 + longint'(q) + longint'(cin); c1 = int'(v / mm); s1 = v % mm;
      v = s1 + s2;           c2 = int'(v / mm); s2 = v % mm;
      v = s2 + s3;           c3 = int'(v / mm); s3 = v % mm;
      y = c1 + c2 - c2_d + c3 - 2 * c3_d + c3_dd;
      c3_dd = c3_d; c3_d = c3; c2_d = c2;
      last_q = q; last_c1 = c1; last_c2 = c2; last_c3 = c3;
      return y;
    endfunction
  endclass

endpackage
