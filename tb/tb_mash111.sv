// tb_mash111: self-checking test of the MASH 1-1-1 modulator, run as the
// conventional 19-bit design (the reference against which the nested
// architecture is sized).
//
// Phase 1 drives random x and cin and compares y every cycle with the
// difference-equation model in ddsm_ref_pkg. Phase 2 resets the modulator
// and holds x = 157287 (0.3 * 2^19, odd) with cin = 0 for two output cycles
// of 2^20 clocks. It checks y against the model, that the sum of y over one
// cycle is 2 * 157287 (mean exactly x / 2^19), that y repeats with period
// 2^20 and not 2^19, and that y spans -3..4. Outputs are combinational and
// are checked just before each rising edge.
module tb_mash111;
  import ddsm_pkg::*;
  import ddsm_ref_pkg::*;

  localparam int unsigned N = 19;
  localparam int unsigned X_CONST = 157287;
  localparam int unsigned L = 1 << (N + 1);

  logic         clk;
  initial clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] x;
  logic         cin;
  ddsm_out_t    y;

  int checks = 0, failures = 0;
  int n_cin = 0;
  byte unsigned hist [int];
  byte signed first_cycle [];

  mash111 #(.N(N)) dut (.clk, .rst_n, .x, .cin, .y);

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
    int r, ymin, ymax, half_diff;
    longint sum;
    ref_m = new(N, 0);
    first_cycle = new[L];

    // Phase 1: random input and carry.
    rst_n = 1'b0; x = '0; cin = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      x   = N'($urandom);
      cin = 1'($urandom);
      #1;
      r = ref_m.step(longint'(x), int'(cin));
      if (cin) n_cin++;
      check(int'(y) == r, "random-input output");
    end

    // Phase 2: constant odd input, two full output cycles.
    @(negedge clk);
    rst_n = 1'b0;
    x = N'(X_CONST);
    cin = 1'b0;
    ref_m.reset();
    @(negedge clk);
    rst_n = 1'b1;
    sum = 0; ymin = 99; ymax = -99; half_diff = 0;
    for (int i = 0; i < 2 * L; i++) begin
      #1;
      r = ref_m.step(longint'(x), 0);
      check(int'(y) == r, "constant-input output");
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
    check(sum == 2 * longint'(X_CONST), "sum over one cycle");
    check(half_diff > 0, "period is not 2^19");
    check(ymin == -3 && ymax == 4, "output spans -3..4");
    check(n_cin > 0, "carry input exercised");
    $display("cycle sum=%0d (expected %0d) range %0d..%0d half-period mismatches=%0d",
             sum, 2 * X_CONST, ymin, ymax, half_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
