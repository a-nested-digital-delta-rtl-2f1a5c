// tb_mash_ncn: self-checking test of the noise cancellation network.
//
// Drives random stage bits y1..y3 and compares the output with
// y1[n] + y2[n] - y2[n-1] + y3[n] - 2*y3[n-1] + y3[n-2] computed from a
// history of the inputs kept in the testbench. Also checks that all eight
// output values -3..4 occur, which exercises the full 4-bit range. The
// output is combinational, so it is checked in the cycle the inputs change.
module tb_mash_ncn;
  import ddsm_pkg::*;

  logic      clk;
  initial clk = 1'b0;
  logic      rst_n;
  logic      y1, y2, y3;
  ddsm_out_t y;

  int checks = 0, failures = 0;
  int seen [-3:4];

  mash_ncn dut (.clk, .rst_n, .y1, .y2, .y3, .y);

  always #5 clk = ~clk;

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int y2d, y3d, y3dd, r;
    for (int k = -3; k <= 4; k++) seen[k] = 0;
    rst_n = 1'b0; y1 = 0; y2 = 0; y3 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    y2d = 0; y3d = 0; y3dd = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      {y1, y2, y3} = 3'($urandom);
      #1;
      r = int'(y1) + int'(y2) - y2d + int'(y3) - 2 * y3d + y3dd;
      checks++;
      if (int'(y) != r) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: y=%0d expected %0d", i, y, r);
      end
      if (r >= -3 && r <= 4) seen[r]++;
      y3dd = y3d; y3d = int'(y3); y2d = int'(y2);
    end
    for (int k = -3; k <= 4; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL output value %0d never occurred", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
