// tb_ddsm_spectrum: output noise spectrum of the nested 1-3 modulator
// (defaults, 14/6 bits, X = 314573) against the conventional 19-bit MASH
// 1-1-1 (X = 157287), both at a normalized input of about 0.3.
//
// Both modulators start from reset and run one full output cycle of
// L = 2^20 clocks, which is exactly periodic, so the DFT of that cycle has
// no leakage. The DFT power |Y[k]/L|^2 is evaluated with the Goertzel
// recursion in three bands of bins and summed. Each band sum is compared
// with the same sum of the ideal third-order envelope
//   S3[k] = |2 sin(pi k / L)|^6 / (12 L),
// the spectrum of (1 - z^-1)^3 times a white error of variance 1/12 over a
// cycle of L. The band around f_s/64 holds the lowest tone of the nested
// design's first-order error (its cycle is 2^6 clocks); the wordlength rule
// is meant to keep that contribution under the third-order noise. A band
// passes if its power is within a factor 2 of the envelope for both
// designs, and the two designs are within a factor 2 of each other.
module tb_ddsm_spectrum;
  import ddsm_pkg::*;

  localparam int unsigned L = 1 << 20;
  localparam int NB = 3;
  localparam int BAND_LO [NB] = '{1024, 4096, 16320};
  localparam int BAND_HI [NB] = '{1088, 4160, 16448};

  logic        clk;
  initial clk = 1'b0;
  logic        rst_n;
  ddsm_out_t   y_nest, y_conv;

  int checks = 0, failures = 0;
  real seq_nest [], seq_conv [];

  nested13_ddsm u_nest (.clk, .rst_n, .x(20'd314573), .y(y_nest));
  mash111 #(.N(19)) u_conv (.clk, .rst_n, .x(19'd157287), .cin(1'b0), .y(y_conv));

  always #5 clk = ~clk;

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real bin_power(ref real s [], input int k);
    real w, coeff, s0, s1, s2;
    w = 2.0 * 3.141592653589793 * real'(k) / real'(L);
    coeff = 2.0 * $cos(w);
    s1 = 0.0;
    s2 = 0.0;
    for (int n = 0; n < int'(L); n++) begin
      s0 = s[n] + coeff * s1 - s2;
      s2 = s1;
      s1 = s0;
    end
    return (s1 * s1 + s2 * s2 - coeff * s1 * s2) / (real'(L) * real'(L));
  endfunction

  function automatic real envelope(input int k);
    real sv;
    sv = 2.0 * $sin(3.141592653589793 * real'(k) / real'(L));
    return (sv ** 6) / (12.0 * real'(L));
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    real p_nest, p_conv, p_env, r_nest, r_conv;
    seq_nest = new[L];
    seq_conv = new[L];
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < int'(L); n++) begin
      #1;
      seq_nest[n] = real'(y_nest);
      seq_conv[n] = real'(y_conv);
      @(negedge clk);
    end
    for (int b = 0; b < NB; b++) begin
      p_nest = 0.0; p_conv = 0.0; p_env = 0.0;
      for (int k = BAND_LO[b]; k < BAND_HI[b]; k++) begin
        p_nest += bin_power(seq_nest, k);
        p_conv += bin_power(seq_conv, k);
        p_env  += envelope(k);
      end
      r_nest = p_nest / p_env;
      r_conv = p_conv / p_env;
      $display("bins %0d..%0d (f/fs %f..%f): nested %e  conventional %e  envelope %e",
               BAND_LO[b], BAND_HI[b] - 1, real'(BAND_LO[b]) / real'(L),
               real'(BAND_HI[b]) / real'(L), p_nest, p_conv, p_env);
      check(r_nest > 0.5 && r_nest < 2.0, "nested band power within 2x of envelope");
      check(r_conv > 0.5 && r_conv < 2.0, "conventional band power within 2x of envelope");
      check(p_nest / p_conv > 0.5 && p_nest / p_conv < 2.0, "nested within 2x of conventional");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
