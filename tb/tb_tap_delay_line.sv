// tb_tap_delay_line: self-checking test of the delay line. Random samples
// are shifted in with shift_en high about two cycles in three; a reference
// array is updated the same way and every tap is compared every cycle.
// A watchdog ends the run after a fixed number of cycles.
module tb_tap_delay_line;
  localparam int NTAPS = fir_pkg::NTAPS;
  localparam int W     = fir_pkg::IN_W;

  logic clk = 0, rst_n = 0, shift_en = 0;
  logic signed [W-1:0] din = '0;
  logic signed [W-1:0] taps [NTAPS];
  logic signed [W-1:0] model [NTAPS];
  int checks = 0, failures = 0, shifts = 0;

  tap_delay_line dut (.clk, .rst_n, .shift_en, .din, .taps);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NTAPS; k++) model[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      @(negedge clk);
      // compare state settled after the last edge
      for (int k = 0; k < NTAPS; k++) begin
        checks++;
        if (taps[k] !== model[k]) begin
          failures++;
          if (failures < 10) $display("cycle %0d tap %0d: got %0d want %0d", cyc, k, taps[k], model[k]);
        end
      end
      shift_en = ($urandom_range(2) != 0);
      din      = W'($urandom);
      @(posedge clk);
      if (shift_en) begin
        shifts++;
        for (int k = NTAPS-1; k > 0; k--) model[k] = model[k-1];
        model[0] = din;
      end
    end
    checks++;
    if (shifts < NTAPS * 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
