// tb_nested13_full: the nested 1-3 modulator at its default wordlengths
// (N_MSB = 14, N_LSB = 6, N = 20) running the design example's input.
//
// After a short random-input warm-up it resets the modulator and holds
// X = 314573 (the odd 20-bit word closest to 0.3 * 2^20) for two output
// cycles of 2^20 clocks, comparing y with the difference-equation model in
// ddsm_ref_pkg every clock. It checks that the sum of y over one cycle is
// exactly X (mean X/2^20), that the output repeats after 2^20 clocks but
// not after 2^19 (the same cycle length as the 19-bit conventional MASH
// 1-1-1), and that y spans -3..4. It also checks the wordlength rule in
// ddsm_pkg: a 20-bit input needs 14 MSBs, and 14/6 meets the masking bound
// while 13/7 does not.
module tb_nested13_full;
  import ddsm_pkg::*;
  import ddsm_ref_pkg::*;

  localparam int unsigned N = NESTED_N_MSB + NESTED_N_LSB;
  localparam int unsigned L = 1 << N;
  localparam int unsigned X_CONST = 314573;

  logic         clk;
  initial clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] x;
  ddsm_out_t    y;

  int checks = 0, failures = 0;
  byte signed first_cycle [];

  nested13_ddsm dut (.clk, .rst_n, .x, .y);

  always #5 clk = ~clk;

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    nested_ref ref_m;
    int r, ymin, ymax, half_diff, n_nest;
    longint sum;
    ref_m = new(NESTED_N_MSB, NESTED_N_LSB);
    first_cycle = new[L];

    check(nested_msb_bits(20) == 14, "wordlength rule: 20-bit input needs 14 MSBs");
    check(nested_msb_bits(16) == 11, "wordlength rule: 16-bit input needs 11 MSBs");
    check(masking_ok(14, 6), "14/6 split meets the masking bound");
    check(!masking_ok(13, 7), "13/7 split violates the masking bound");

    rst_n = 1'b0; x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 10000; i++) begin
      @(negedge clk);
      x = N'($urandom);
      #1;
      r = ref_m.step(longint'(x), 0);
      check(int'(y) == r, "random-input output");
    end

    @(negedge clk);
    rst_n = 1'b0;
    x = N'(X_CONST);
    ref_m.reset();
    @(negedge clk);
    rst_n = 1'b1;
    sum = 0; ymin = 99; ymax = -99; half_diff = 0; n_nest = 0;
    for (int i = 0; i < 2 * L; i++) begin
      #1;
      r = ref_m.step(longint'(x), 0);
      if (ref_m.last_q != 0) n_nest++;
      check(int'(y) == r, "design-example output");
      if (i < L) begin
        first_cycle[i] = byte'(y);
        sum += longint'(y);
        if (int'(y) < ymin) ymin = int'(y);
        if (int'(y) > ymax) ymax = int'(y);
        if (i >= L / 2 && first_cycle[i] != first_cycle[i - L/2]) half_diff++;
      end else begin
        check(first_cycle[i - L] == byte'(y), "output repeats after 2^20 cycles");
      end
      @(negedge clk);
    end
    check(sum == longint'(X_CONST), "sum over one cycle equals X");
    check(half_diff > 0, "period is not 2^19");
    check(ymin == -3 && ymax == 4, "output spans -3..4");
    // X_LSB = 314573 mod 64 = 13: 13 carries per 64 clocks into the MASH.
    check(n_nest == 2 * L / 64 * 13, "nested carry rate X_LSB/2^6");
    $display("cycle sum=%0d (X=%0d) range %0d..%0d half-period mismatches=%0d nested carries=%0d",
             sum, X_CONST, ymin, ymax, half_diff, n_nest);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
