// tb_da_controller: checks the sequencing of the bit-serial filter: ready
// only in idle, shift_en only on an accepted sample, bit_idx counting
// B-1 down to 0 with acc_en high and acc_first only on the first bit, and
// done exactly B+1 cycles after the accepting edge. Back-to-back samples
// must be accepted every B+1 cycles.
module tb_da_controller;
  localparam int B = fir_pkg::IN_W;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, shift_en, acc_en, acc_first, done;
  logic [$clog2(B)-1:0] bit_idx;
  int checks = 0, failures = 0;

  da_controller dut (.clk, .rst_n, .in_valid, .in_ready, .shift_en, .bit_idx,
                     .acc_en, .acc_first, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("%0t %s", $time, what);
    end
  endtask

  // Reference: cycles since acceptance (0 = idle, 1..B = bit cycles).
  int phase = 0;
  int accepted = 0, dones = 0, last_accept = -100, cyc = 0;

  always @(negedge clk) if (rst_n) begin
    expect_bit(in_ready == (phase == 0), "in_ready");
    expect_bit(shift_en == (phase == 0 && in_valid), "shift_en");
    expect_bit(acc_en == (phase != 0), "acc_en");
    if (phase != 0) begin
      expect_bit(int'(bit_idx) == B - phase, "bit_idx");
      expect_bit(acc_first == (phase == 1), "acc_first");
    end else expect_bit(!acc_first, "acc_first idle");
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    expect_bit(done == (cyc - last_accept == B + 1), "done timing");
    if (done) dones++;
    if (phase == 0 && in_valid) begin
      phase = 1; accepted++; last_accept = cyc;
    end else if (phase == B) phase = 0;
    else if (phase != 0) phase++;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // back-to-back
    in_valid = 1;
    repeat (10 * (B + 1)) @(negedge clk);
    expect_bit(accepted == 10, "throughput one sample per B+1 cycles");
    // random
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) == 0);
    end
    in_valid = 0;
    repeat (B + 3) @(negedge clk);
    expect_bit(dones == accepted, "one done per sample");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
