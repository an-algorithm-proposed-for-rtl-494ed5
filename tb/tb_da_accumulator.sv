// tb_da_accumulator: feeds B = 8 random partial sums, most significant bit
// plane first, and checks the result against -z7*2^7 + sum z_b*2^b worked
// out in integer arithmetic. Also checks that the value holds while en is
// low and that extreme partial sums do not overflow.
module tb_da_accumulator;
  localparam int PS_W  = fir_pkg::PS_W;
  localparam int ACC_W = fir_pkg::ACC_W;
  localparam int B     = fir_pkg::IN_W;

  logic clk = 0, rst_n = 0, en = 0, first = 0;
  logic signed [PS_W-1:0]  z = '0;
  logic signed [ACC_W-1:0] acc;
  int checks = 0, failures = 0;

  da_accumulator dut (.clk, .rst_n, .en, .first, .z, .acc);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int zs [B];
    longint expect_v;
    int lim;
    lim = (1 << (PS_W-1));
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      expect_v = 0;
      for (int b = B-1; b >= 0; b--) begin
        case (t)
          0: zs[b] = lim - 1;
          1: zs[b] = -lim;
          2: zs[b] = (b == B-1) ? -lim : lim - 1;
          default: zs[b] = $urandom_range(2*lim-1) - lim;
        endcase
        expect_v += (b == B-1) ? -(longint'(zs[b]) <<< b) : (longint'(zs[b]) <<< b);
      end
      for (int b = B-1; b >= 0; b--) begin
        @(negedge clk);
        en = 1; first = (b == B-1); z = PS_W'(zs[b]);
      end
      @(negedge clk);
      en = 0; first = 0; z = PS_W'($urandom);
      checks++;
      if (longint'(acc) != expect_v) begin
        failures++;
        if (failures < 10) $display("t=%0d got %0d want %0d", t, acc, expect_v);
      end
      @(negedge clk);
      checks++;
      if (longint'(acc) != expect_v) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
