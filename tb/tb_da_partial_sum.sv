// tb_da_partial_sum: checks the bit-plane adder against the modified
// coefficient table written out here by hand (first half h[0]..h[40] in
// units of 1/8, mirrored for h[41]..h[80]). Patterns: all zeros, all ones
// (sum of all coefficients), each single tap, and random bit vectors. It
// also checks that the table has 43 non-zero values.
module tb_da_partial_sum;
  localparam int NTAPS = 81;
  localparam int PS_W  = fir_pkg::PS_W;
  localparam int HALF_TAB [41] = '{
     5, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 1, 1, 1, 0,
     0, 0,-1,-1,-1,-2,-2,-1,-1, 0, 0, 1, 3, 4, 5, 6, 7, 8, 8, 8 };

  logic bits [NTAPS];
  logic signed [PS_W-1:0] z;
  int h [NTAPS];
  int checks = 0, failures = 0;

  da_partial_sum dut (.bits, .z);

  task automatic check(string what);
    int expect_v = 0;
    for (int k = 0; k < NTAPS; k++) if (bits[k]) expect_v += h[k];
    #1;
    checks++;
    if (int'(z) != expect_v) begin
      failures++;
      if (failures < 10) $display("%s: got %0d want %0d", what, z, expect_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nz;
    nz = 0;
    for (int k = 0; k < 41; k++) begin h[k] = HALF_TAB[k]; h[80-k] = HALF_TAB[k]; end
    for (int k = 0; k < NTAPS; k++) if (h[k] != 0) nz++;
    checks++;
    if (nz != 43) failures++;
    for (int k = 0; k < NTAPS; k++) bits[k] = 1'b0;
    check("zeros");
    for (int k = 0; k < NTAPS; k++) bits[k] = 1'b1;
    check("ones");
    for (int j = 0; j < NTAPS; j++) begin
      for (int k = 0; k < NTAPS; k++) bits[k] = (k == j);
      check("single");
    end
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < NTAPS; k++) bits[k] = 1'($urandom);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
