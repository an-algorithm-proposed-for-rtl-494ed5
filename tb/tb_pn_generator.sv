// tb_pn_generator: compares the code with the recurrence
// a[n+5] = a[n] xor a[n+2] started from the all-ones seed, checks the
// period of 31 chips, the m-sequence balance (16 ones, 15 zeros per
// period) and that the chip holds while advance is low.
module tb_pn_generator;
  logic clk = 0, rst_n = 0, advance = 0, chip;
  int checks = 0, failures = 0;
  bit a [200];

  pn_generator dut (.clk, .rst_n, .advance, .chip);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, ones;
    n = 0;
    ones = 0;
    for (int i = 0; i < 5; i++) a[i] = 1;
    for (int i = 0; i + 5 < 200; i++) a[i+5] = a[i] ^ a[i+2];
    for (int i = 0; i < 31; i++) ones += a[i];
    checks++;
    if (ones != 16) failures++;
    for (int i = 31; i < 200; i++) begin
      checks++;
      if (a[i] != a[i-31]) failures++;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (n < 190) begin
      @(negedge clk);
      checks++;
      if (chip !== a[n]) begin
        failures++;
        if (failures < 10) $display("chip %0d: got %0b want %0b", n, chip, a[n]);
      end
      advance = 1'($urandom_range(1));
      @(posedge clk);
      if (advance) n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
