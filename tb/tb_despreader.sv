// tb_despreader: builds an ideal received stream in the testbench: DELAY
// leading samples (run twice, with the skip counts 80 and 40 that the link
// uses with and without its matched filter), then per chip one sample of +/-A*(code) plus bounded
// noise at the chip instant and SPC-1 samples of large junk between chips
// (which must be ignored). A testbench PN model answers pn_advance. Checks
// every decided bit and its correlation value, worked out here.
module tb_despreader;
  localparam int SF    = fir_pkg::SF;
  localparam int SPC   = fir_pkg::SPC;
  localparam int W     = fir_pkg::Y_W;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] in_sample = '0;
  logic chip, pn_advance, bit_valid, bit_out;
  logic signed [W+$clog2(SF):0] corr;
  logic [7:0] delay = 8'd80;
  logic [4:0] lfsr;
  int checks = 0, failures = 0, decided = 0;
  bit sent_bits [$];
  int want_corr [$];

  despreader dut (.clk, .rst_n, .delay, .in_valid, .in_sample, .chip, .pn_advance,
                  .bit_valid, .bit_out, .corr);

  assign chip = lfsr[0];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) lfsr <= '1;
    else if (pn_advance) lfsr <= {lfsr[0] ^ lfsr[2], lfsr[4:1]};

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && bit_valid) begin : score
    bit wb; int wc;
    wb = sent_bits.pop_front();
    wc = want_corr.pop_front();
    decided++;
    checks += 2;
    if (bit_out != wb) failures++;
    if (int'(corr) != wc) begin
      failures++;
      if (failures < 10) $display("bit %0d corr got %0d want %0d", decided, corr, wc);
    end
  end

  task automatic put(int v);
    @(negedge clk);
    in_valid = 1; in_sample = W'(v);
    @(negedge clk);
    in_valid = 0;
    repeat ($urandom_range(2)) @(negedge clk);
  endtask

  initial begin
    bit m [31];
    for (int i = 0; i < 5; i++) m[i] = 1;
    for (int i = 0; i + 5 < 31; i++) m[i+5] = m[i] ^ m[i+2];
    for (int run = 0; run < 2; run++) begin
      int delay_v;
      delay_v = (run == 0) ? 80 : 40;
      @(negedge clk);
      rst_n = 0;
      delay = 8'(delay_v);
      repeat (2) @(negedge clk);
      rst_n = 1;
      repeat (delay_v) put(5000);
      for (int b = 0; b < 20; b++) begin
        bit d;
        int acc;
        int s [SF];
        d   = (b < 2) ? 1'(b) : 1'($urandom);
        acc = 0;
        for (int c = 0; c < SF; c++) begin
          s[c] = ((d ^ m[c]) ? -64 : 64) + int'($urandom_range(120)) - 60;
          acc += m[c] ? -s[c] : s[c];
        end
        sent_bits.push_back(acc < 0);
        want_corr.push_back(acc);
        // the decided bit must equal d since the noise is bounded
        checks++;
        if ((acc < 0) != d) failures++;
        for (int c = 0; c < SF; c++) begin
          put(s[c]);
          repeat (SPC - 1) put(8000 - int'($urandom_range(16000)));
        end
      end
      repeat (5) @(negedge clk);
      checks++;
      if (decided != 20 * (run + 1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
