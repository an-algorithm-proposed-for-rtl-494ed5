// tb_dsss_spreader: drives random data bits into the spreader, with a PN
// generator model in the testbench answering pn_advance, and random
// back-pressure on out_ready. Every accepted sample is compared with the
// expected pattern: one impulse of +/-56 (sign = bit xor chip) followed by
// SPC-1 zeros per chip, SF chips per bit. Also checks that a new bit is
// taken only after the previous one's SF*SPC samples.
module tb_dsss_spreader;
  localparam int SF  = fir_pkg::SF;
  localparam int SPC = fir_pkg::SPC;
  localparam int W   = fir_pkg::IN_W;
  localparam int AMP = fir_pkg::CHIP_AMP;

  logic clk = 0, rst_n = 0, bit_valid = 0, bit_in = 0, out_ready = 0;
  logic bit_ready, pn_advance, out_valid;
  logic chip;
  logic signed [W-1:0] out_sample;
  logic [4:0] lfsr;
  int checks = 0, failures = 0;
  bit bits_q [$];
  int samp = 0, chip_idx = 0, nbits_done = 0, stalls = 0;
  bit cur_bit;

  dsss_spreader dut (.clk, .rst_n, .bit_valid, .bit_ready, .bit_in, .chip,
                     .pn_advance, .out_valid, .out_ready, .out_sample);

  assign chip = lfsr[0];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) lfsr <= '1;
    else if (pn_advance) lfsr <= {lfsr[0] ^ lfsr[2], lfsr[4:1]};

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard.
  always @(posedge clk) if (rst_n) begin
    if (bit_valid && bit_ready) begin
      checks++;
      if (samp != 0 || chip_idx != 0) failures++;
      bits_q.push_back(bit_in);
    end
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      int want;
      if (samp == 0 && chip_idx == 0) cur_bit = bits_q.pop_front();
      want = (samp != 0) ? 0 : ((cur_bit ^ chip) ? -AMP : AMP);
      checks += 2;
      if (int'(out_sample) != want) begin
        failures++;
        if (failures < 10) $display("bit %0d chip %0d samp %0d: got %0d want %0d",
                                    nbits_done, chip_idx, samp, out_sample, want);
      end
      if (pn_advance != (samp == SPC-1)) failures++;
      if (samp == SPC-1) begin
        samp = 0;
        if (chip_idx == SF-1) begin chip_idx = 0; nbits_done++; end
        else chip_idx++;
      end else samp++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    fork
      forever begin
        @(negedge clk);
        out_ready = ($urandom_range(3) != 0);
      end
      begin
        for (int b = 0; b < 24; b++) begin
          @(negedge clk);
          bit_valid = 1; bit_in = (b < 2) ? 1'(b) : 1'($urandom);
          do @(posedge clk); while (!bit_ready);
          @(negedge clk) bit_valid = 0;
          repeat ($urandom_range(4)) @(negedge clk);
        end
      end
    join_any
    while (nbits_done < 24) @(negedge clk);
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
