// tb_cdma_ber: bit-error-rate run of the CDMA link, 10000 data bits in
// total: 8000 with the receive matched filter at four noise levels and 2000
// with pulse shaping at the transmitter only at two noise levels. The
// channel scales the transmitted sample by an attenuation a, adds
// approximately Gaussian noise of deviation sigma (sum of 12 uniform values)
// and a sinusoid of amplitude 5, rounds and clips to the 8-bit receiver
// input.
// For each level it prints the measured error rate next to a Gaussian
// estimate BER = Q(mu / sqrt(SF * (sn^2 + st^2))), where
//   mu  = a*AMP/s * (SF*p0 - sum_{j!=0} p_j)  (chips sampled at the peak p0
//         of the pulse; the off-peak samples p_j at multiples of 10 enter
//         through the m-sequence autocorrelation, which is -1 off peak),
//   sn  = filtered noise per chip, st^2 = (tone amplitude * filter gain)^2/2,
// with p the combined transmit and matched response h*h (s = 64) or the
// transmit response h alone (s = 8). It checks that the measured count lies
// within a wide band around the estimate, and that the lowest noise level
// gives no error. Runs at the link's default parameters.
module tb_cdma_ber;
  localparam int SF = fir_pkg::SF, SPC = fir_pkg::SPC, NTAPS = 81;
  localparam int AMP = fir_pkg::CHIP_AMP;
  localparam int NLEV = 6;
  localparam bit LEV_MF   [NLEV] = '{1, 1, 1, 1, 0, 0};
  localparam int LEV_SIG  [NLEV] = '{14, 20, 27, 40, 30, 45};
  localparam int LEV_BITS [NLEV] = '{2000, 2000, 2000, 2000, 1000, 1000};
  localparam real TONE = 5.0, W_TONE = 0.31;
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
  bit sent [$];
  int n_dec = 0, errors = 0, sigma = 14;
  real atten = 1.0 / 16.0;
  real phase = 0.0;

  // Sum of 12 uniforms in [-0.5, 0.5) has unit variance.
  function automatic real gauss();
    real g;
    g = 0.0;
    for (int i = 0; i < 12; i++) g += real'($urandom_range(65535)) / 65536.0 - 0.5;
    return g;
  endfunction

  function automatic real qfunc(real x);
    real acc, dt, t;
    acc = 0.0; dt = 0.001;
    for (int i = 0; i < 12000; i++) begin
      t = x + (real'(i) + 0.5) * dt;
      acc += $exp(-t * t / 2.0) * dt;
    end
    return acc / $sqrt(2.0 * 3.141592653589793);
  endfunction

  // channel: attenuation, noise, tone, rounding, 8-bit clipping
  real noise_now = 0.0;
  always @(posedge clk) begin
    noise_now <= real'(sigma) * gauss() + TONE * $sin(phase);
    if (tx_valid) phase = phase + W_TONE;
  end

  function automatic int clip8(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  assign rx_valid  = tx_valid;
  assign rx_sample = 8'(clip8(int'(atten * real'(tx_sample) + noise_now)));

  always @(posedge clk) if (rst_n && rx_bit_valid) begin
    if (n_dec < sent.size() && rx_bit != sent[n_dec]) errors++;
    n_dec++;
  end

  initial begin
    repeat (10200 * SF * SPC * 10) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g [2*NTAPS-1];
    real gain_re, gain_im, gain;
    for (int k = 0; k < 41; k++) begin h[k] = HALF_TAB[k]; h[80-k] = HALF_TAB[k]; end
    for (int n = 0; n < 2*NTAPS-1; n++) begin
      g[n] = 0;
      for (int k = 0; k < NTAPS; k++) if (n - k >= 0 && n - k < NTAPS) g[n] += h[k] * h[n-k];
    end
    gain_re = 0.0; gain_im = 0.0;
    for (int k = 0; k < NTAPS; k++) begin
      gain_re += real'(h[k]) * $cos(W_TONE * real'(k));
      gain_im -= real'(h[k]) * $sin(W_TONE * real'(k));
    end
    gain = $sqrt(gain_re * gain_re + gain_im * gain_im) / 8.0;
    for (int lev = 0; lev < NLEV; lev++) begin
      int e0, peak, off, sumsq;
      real mu, sn2, st2, p, expected, scale;
      @(negedge clk) rst_n = 0;
      mf_en = LEV_MF[lev];
      sigma = LEV_SIG[lev];
      atten = mf_en ? 1.0 / 16.0 : 1.0 / 4.0;
      repeat (3) @(negedge clk);
      rst_n = 1;
      sent.delete();
      n_dec = 0;
      e0 = errors;
      for (int b = 0; b < LEV_BITS[lev] + 3; b++) begin
        @(negedge clk);
        tx_bit_valid = 1; tx_bit = 1'($urandom);
        do @(posedge clk); while (!tx_bit_ready);
        sent.push_back(tx_bit);
        @(negedge clk) tx_bit_valid = 0;
      end
      while (n_dec < LEV_BITS[lev]) @(posedge clk);
      // Gaussian estimate
      off = 0;
      if (mf_en) begin
        peak = g[NTAPS-1];
        for (int j = 1; j * SPC < NTAPS; j++) off += 2 * g[NTAPS-1 + j*SPC];
        sumsq = 0;
        for (int k = 0; k < NTAPS; k++) sumsq += h[k] * h[k];
        scale = atten * real'(AMP) / 64.0;
        sn2 = real'(sigma * sigma) * real'(sumsq) / 64.0;
        st2 = (TONE * gain) * (TONE * gain) / 2.0;
      end else begin
        peak = h[(NTAPS-1)/2];
        for (int j = 1; j * SPC <= (NTAPS-1)/2; j++) off += 2 * h[(NTAPS-1)/2 + j*SPC];
        scale = atten * real'(AMP) / 8.0;
        sn2 = real'(sigma * sigma);
        st2 = TONE * TONE / 2.0;
      end
      mu = scale * real'(SF * peak - off);
      p = qfunc(mu / $sqrt(real'(SF) * (sn2 + st2)));
      expected = p * real'(LEV_BITS[lev]);
      $display("%s sigma %0d  errors %0d / %0d  BER %8.5f  estimate %8.5f",
               mf_en ? "matched filter " : "transmit only  ", sigma, errors - e0, LEV_BITS[lev],
               real'(errors - e0) / real'(LEV_BITS[lev]), p);
      checks++;
      if (expected < 1.0) begin
        if (errors - e0 > 2) failures++;
      end else if (real'(errors - e0) < 0.5 * expected - 3.0 ||
                   real'(errors - e0) > 1.6 * expected + 3.0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
