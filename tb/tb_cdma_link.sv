// tb_cdma_link: end-to-end test of the CDMA link at its default parameters,
// in both receiver modes: first with the receive matched filter (mf_en = 1),
// then, after a reset, with pulse shaping at the transmitter only
// (mf_en = 0). Data bits go into the transmitter; the transmitted samples
// pass through a channel model (approximately Gaussian noise plus a strong
// sinusoidal interferer, digitised to 8 bits with clipping) and come back
// into the receiver. Checks:
//  - every transmitted sample against a reference built here: the spread
//    impulse train (m-sequence a[n+5] = a[n] xor a[n+2], +/-56 per chip,
//    10 samples per chip) convolved with the modified coefficient table,
//    shifted right by 3 and saturated to 8 bits;
//  - every matched-filter output against the same convolution applied to
//    the received samples;
//  - every decided bit equals the bit sent;
//  - the filter takes one sample every 9 cycles while the spreader streams.
// It also counts how often each mechanism happened (filter back-pressure on
// the spreader, a non-zero sign-bit plane subtracted in the accumulator,
// chips whose sign the channel flipped but whose bit despreading still got
// right, both bit values, an idle transmitter, and each of the two modes)
// and counts a failure for any that never did.
module tb_cdma_link;
  localparam int SF = fir_pkg::SF, SPC = fir_pkg::SPC, NTAPS = 81;
  localparam int AMP = fir_pkg::CHIP_AMP;
  localparam int NBITS = 30;            // checked bits per mode
  localparam int HALF_TAB [41] = '{
     5, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 1, 1, 1, 0,
     0, 0,-1,-1,-1,-2,-2,-1,-1, 0, 0, 1, 3, 4, 5, 6, 7, 8, 8, 8 };

  logic clk = 0, rst_n = 0, mf_en = 1;
  logic tx_bit_valid = 0, tx_bit_ready, tx_bit = 0;
  logic tx_valid;
  logic signed [7:0] tx_sample;
  logic rx_valid;
  logic signed [7:0] rx_sample;
  logic rx_bit_valid, rx_bit;
  logic signed [fir_pkg::Y_W+$clog2(SF):0] rx_corr;

  cdma_link dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int h [NTAPS];
  bit m [SF];
  bit sent [$];
  int rx_hist [$];
  int n_out = 0, n_mf = 0, n_dec = 0, cyc = 0;
  int cnt_backpressure = 0, cnt_sign_plane = 0, cnt_chip_flips = 0;
  int cnt_ones = 0, cnt_zeros = 0, cnt_idle = 0, cnt_mode_mf = 0, cnt_mode_tx = 0;
  int noise_now = 0;
  real phase = 0.0;

  // ---- channel model ------------------------------------------------------
  function automatic int gauss20();
    int s;
    s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom_range(68)) - 34;
    return s;   // roughly N(0, 20^2)
  endfunction

  function automatic int clip8(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  always @(posedge clk) begin
    noise_now <= gauss20() + int'(60.0 * $sin(phase));
    if (tx_valid) phase = phase + 0.31;
  end
  assign rx_valid  = tx_valid;
  assign rx_sample = 8'(clip8(int'(tx_sample) + noise_now));

  // ---- reference models -----------------------------------------------------
  function automatic int x_ref(int n);
    int b, c;
    if (n < 0 || n % SPC != 0) return 0;
    b = n / (SF * SPC);
    c = (n / SPC) % SF;
    if (b >= sent.size()) return 0;
    return (sent[b] ^ m[c]) ? -AMP : AMP;
  endfunction

  always @(posedge clk) if (rst_n) begin : score
    int y;
    cyc++;
    if (dut.u_spread.out_valid && !dut.u_fir.in_ready) cnt_backpressure++;
    if (dut.u_fir.u_ctrl.acc_first && dut.u_fir.z != 0) cnt_sign_plane++;
    if (dut.u_mf.u_ctrl.acc_first && dut.u_mf.z != 0) cnt_sign_plane++;
    if (tx_bit_ready && !tx_bit_valid) cnt_idle++;
    if (tx_valid) begin
      y = 0;
      for (int k = 0; k < NTAPS; k++) y += h[k] * x_ref(n_out - k);
      checks++;
      if (int'(tx_sample) != clip8(y >>> 3)) begin
        failures++;
        if (failures < 10) $display("tx sample %0d: got %0d want %0d", n_out, tx_sample, clip8(y >>> 3));
      end
      if (mf_en) rx_hist.push_back(int'(rx_sample));
      n_out++;
    end
    if (mf_en && dut.u_mf.out_valid) begin
      y = 0;
      for (int k = 0; k < NTAPS; k++)
        if (n_mf - k >= 0) y += h[k] * rx_hist[n_mf - k];
      checks++;
      if (int'(dut.u_mf.out_y) != y) begin
        failures++;
        if (failures < 10) $display("matched filter sample %0d: got %0d want %0d", n_mf, dut.u_mf.out_y, y);
      end
      n_mf++;
    end
    if (dut.u_despread.take && n_dec < sent.size())
      if ((dut.u_despread.in_sample < 0) != (sent[n_dec] ^ dut.rx_chip)) cnt_chip_flips++;
    if (rx_bit_valid) begin
      if (n_dec < NBITS) begin
        checks++;
        if (rx_bit != sent[n_dec]) begin
          failures++;
          $display("mode %0d bit %0d: got %0b want %0b (corr %0d)", mf_en, n_dec, rx_bit, sent[n_dec], rx_corr);
        end
        if (rx_bit) cnt_ones++; else cnt_zeros++;
        if (mf_en) cnt_mode_mf++; else cnt_mode_tx++;
      end
      n_dec++;
    end
  end

  // ---- watchdog ---------------------------------------------------------------
  initial begin
    repeat (2 * (NBITS + 6) * SF * SPC * 10 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_count(string what, int n);
    checks++;
    $display("%-44s %0d", what, n);
    if (n == 0) begin failures++; $display("  never happened"); end
  endtask

  task automatic run_mode(bit mode);
    int c0, o0;
    @(negedge clk);
    rst_n = 0;
    mf_en = mode;
    sent.delete();
    rx_hist.delete();
    n_out = 0; n_mf = 0; n_dec = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);       // transmitter idle
    for (int b = 0; b < NBITS + 3; b++) begin
      bit d;
      d = (b < 2) ? 1'(b) : 1'($urandom);
      @(negedge clk);
      tx_bit_valid = 1; tx_bit = d;
      do @(posedge clk); while (!tx_bit_ready);
      sent.push_back(d);
      @(negedge clk) tx_bit_valid = 0;
      if (b == 5) begin
        c0 = cyc; o0 = n_out;
        while (n_out - o0 < 20) @(posedge clk);
        checks++;
        if (cyc - c0 > 20 * (fir_pkg::IN_W + 1) + 1) begin
          failures++;
          $display("throughput: 20 samples took %0d cycles", cyc - c0);
        end
      end
    end
    while (n_dec < NBITS) @(posedge clk);
  endtask

  initial begin
    for (int k = 0; k < 41; k++) begin h[k] = HALF_TAB[k]; h[80-k] = HALF_TAB[k]; end
    for (int i = 0; i < 5; i++) m[i] = 1;
    for (int i = 0; i + 5 < SF; i++) m[i+5] = m[i] ^ m[i+2];
    repeat (3) @(posedge clk);
    run_mode(1'b1);
    run_mode(1'b0);
    check_count("filter back-pressure cycles", cnt_backpressure);
    check_count("sign-bit planes subtracted", cnt_sign_plane);
    check_count("chips flipped by channel, bits still right", cnt_chip_flips);
    check_count("bits decided as 1", cnt_ones);
    check_count("bits decided as 0", cnt_zeros);
    check_count("idle cycles without data", cnt_idle);
    check_count("bits through the matched-filter mode", cnt_mode_mf);
    check_count("bits through the transmit-only mode", cnt_mode_tx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
