// tb_nested13_ddsm: end-to-end test of the nested 1-3 modulator at reduced
// wordlengths (N_MSB = 8, N_LSB = 3, N = 11; 4*3 - 8 = 4 meets the masking
// rule), so that full output cycles take only 2^11 clocks.
//
// Every cycle the output is compared with the difference-equation model in
// ddsm_ref_pkg, which also reports its internal carries. The scenario:
//   1. random input words;
//   2. an asynchronous reset in the middle of operation;
//   3. constant odd X = 1453: sum of y over 2^11 clocks equals X, the output
//      repeats after 2^11 clocks and not after 2^10;
//   4. X = 5 (only LSBs set): the whole mean comes through the first-order
//      modulator's carry into the third-order part;
//   5. X = 0x500 (only MSBs set): the first-order part never carries.
// Mechanisms counted, each of which must happen at least once: carry from
// the LSB modulator into the MASH, overflow of each of the three MASH
// accumulators, each output level -3..4, the mid-run reset.
module tb_nested13_ddsm;
  import ddsm_pkg::*;
  import ddsm_ref_pkg::*;

  localparam int unsigned N_MSB = 8;
  localparam int unsigned N_LSB = 3;
  localparam int unsigned N = N_MSB + N_LSB;
  localparam int unsigned L = 1 << N;

  logic         clk;
  initial clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] x;
  ddsm_out_t    y;

  int checks = 0, failures = 0;
  int n_nest_carry = 0, n_c1 = 0, n_c2 = 0, n_c3 = 0, n_reset = 0;
  int level [-3:4];
  nested_ref ref_m;

  nested13_ddsm #(.N_MSB(N_MSB), .N_LSB(N_LSB)) dut (.clk, .rst_n, .x, .y);

  always #5 clk = ~clk;

  initial begin
    #2ms;
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

  // One clock with input xv: compare y with the model just before the
  // rising edge and return it.
  task automatic step(input logic [N-1:0] xv, output int yv);
    int r;
    x = xv;
    #1;
    r = ref_m.step(longint'(xv), 0);
    yv = int'(y);
    check(yv == r, "output vs model");
    if (ref_m.last_q  != 0) n_nest_carry++;
    if (ref_m.last_c1 != 0) n_c1++;
    if (ref_m.last_c2 != 0) n_c2++;
    if (ref_m.last_c3 != 0) n_c3++;
    if (r >= -3 && r <= 4) level[r]++;
    @(negedge clk);
  endtask

  task automatic restart(input logic [N-1:0] xv);
    rst_n = 1'b0;
    x = xv;
    ref_m.reset();
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // Run two full cycles at constant xv; check the mean and the period.
  task automatic run_cycle(input logic [N-1:0] xv);
    int buffer [];
    int yv, sum, half_diff;
    buffer = new[L];
    restart(xv);
    sum = 0; half_diff = 0;
    for (int i = 0; i < 2 * L; i++) begin
      step(xv, yv);
      if (i < L) begin
        buffer[i] = yv;
        sum += yv;
        if (i >= L / 2 && buffer[i] != buffer[i - L/2]) half_diff++;
      end else begin
        check(buffer[i - L] == yv, "output repeats after 2^N cycles");
      end
    end
    check(sum == int'(xv), "sum over one cycle equals X");
    if (xv[0]) check(half_diff > 0, "odd input: period is not 2^(N-1)");
    $display("X=%0d: sum over %0d clocks = %0d, half-period mismatches %0d",
             xv, L, sum, half_diff);
  endtask

  initial begin
    int yv, nc;
    for (int k = -3; k <= 4; k++) level[k] = 0;
    ref_m = new(N_MSB, N_LSB);

    rst_n = 1'b0; x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // 1. random input
    for (int i = 0; i < 3000; i++) step(N'($urandom), yv);

    // 2. asynchronous reset in mid-operation, away from a clock edge
    #2 rst_n = 1'b0;
    ref_m.reset();
    n_reset++;
    #1 check(int'(y) == ref_m.step(longint'(x), 0), "output right after reset");
    ref_m.reset();
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) step(N'($urandom), yv);

    // 3. the reduced-size counterpart of the design example's input
    run_cycle(N'(1453));

    // 4. only the LSB part active: every carry comes from the nested path
    nc = n_nest_carry;
    run_cycle(N'(5));
    check(n_nest_carry - nc == 2 * L * 5 / (1 << N_LSB),
          "LSB-only input: nested carry rate is X_LSB / 2^N_LSB");

    // 5. only the MSB part active: no nested carries
    nc = n_nest_carry;
    run_cycle(N'(11'h500));
    check(n_nest_carry == nc, "MSB-only input: no nested carries");

    check(n_nest_carry > 0, "nested carry into MASH happened");
    check(n_c1 > 0, "stage 1 overflow happened");
    check(n_c2 > 0, "stage 2 overflow happened");
    check(n_c3 > 0, "stage 3 overflow happened");
    check(n_reset > 0, "mid-run reset happened");
    for (int k = -3; k <= 4; k++) check(level[k] > 0, "every output level occurred");
    $display("nested carries=%0d stage overflows=%0d/%0d/%0d resets=%0d",
             n_nest_carry, n_c1, n_c2, n_c3, n_reset);
    $display("levels -3..4: %0d %0d %0d %0d %0d %0d %0d %0d", level[-3], level[-2],
             level[-1], level[0], level[1], level[2], level[3], level[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
