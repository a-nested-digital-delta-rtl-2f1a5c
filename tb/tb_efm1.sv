// tb_efm1: self-checking test of the first-order accumulator modulator.
//
// Phase 1 drives random x and cin and compares y and e every cycle with an
// integer model (v = x + acc + cin; y = v >= 2^N; e = v mod 2^N). Phase 2
// holds an odd x with cin = 0 for 2^N cycles after reset and checks that
// exactly x ones come out and that the stored residue is back at zero (cycle length
// 2^N). Inputs change on the falling edge and outputs are checked just
// before the rising edge, since the block's outputs are combinational.
module tb_efm1;
  localparam int unsigned N = 6;
  localparam int unsigned CYCLES_RANDOM = 4000;

  logic         clk;
  initial clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] x;
  logic         cin;
  logic         y;
  logic [N-1:0] e;

  int checks = 0, failures = 0;
  int n_carry = 0;

  efm1 #(.N(N)) dut (.clk, .rst_n, .x, .cin, .y, .e);

  always #5 clk = ~clk;

  initial begin
    #200000;
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
    int acc, v, ones;
    rst_n = 1'b0; x = '0; cin = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    acc = 0;
    for (int i = 0; i < CYCLES_RANDOM; i++) begin
      @(negedge clk);
      x   = N'($urandom);
      cin = 1'($urandom);
      #1;
      v = int'(x) + acc + int'(cin);
      check(y == (v >= (1 << N)), "carry");
      check(int'(e) == v % (1 << N), "residue");
      if (v >= (1 << N)) n_carry++;
      acc = v % (1 << N);
    end
    // Mean value over one full cycle for an odd input.
    @(negedge clk);
    rst_n = 1'b0;
    x = N'(37);
    cin = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    ones = 0;
    for (int i = 0; i < (1 << N); i++) begin
      #1;
      ones += int'(y);
      @(negedge clk);
    end
    check(ones == 37, "ones in one cycle");
    // After 2^N cycles the stored residue is back at zero, so e == x.
    #1;
    check(int'(e) == 37 && y == 1'b0, "residue returns to zero after 2^N cycles");
    check(n_carry > 0, "carry occurred");
    $display("carries=%0d ones_per_cycle=%0d", n_carry, ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
