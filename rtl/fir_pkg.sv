// fir_pkg: constants, types and elaboration-time functions shared by the
// pulse-shaping filter and the CDMA link around it.
//
// The filter is an 80th-order (81-coefficient) square-root raised-cosine
// pulse-shaping filter, roll-off 0.22, 10 samples per symbol (span of +/-4
// symbols). Its coefficient set is not stored as a table of final values:
// the package keeps the first half of the floating-point design (h[0] ..
// h[40]; the response is symmetric) and derives the hardware coefficients at
// elaboration with modified_coefs(), which applies the coefficient-reduction
// procedure:
//   1. multiply every original coefficient by 2^SCALE_LOG2 (8 by default),
//   2. round to the nearest integer,
//   3. replace the first and last coefficient, which round to zero, by a
//      small non-zero edge value (EDGE_COEF),
//   4. mirror the half to get all NTAPS coefficients.
// Dividing by 2^SCALE_LOG2 again (normalisation) is a right shift at the
// filter output. With the default values 43 of the 81 coefficients are
// non-zero, so a direct accumulation needs 42 additions instead of 80.
// The stored values equal the closed-form square-root raised-cosine
//   h(t) = [sin(pi t (1-b)) + 4 b t cos(pi t (1+b))] / [pi t (1 - (4 b t)^2)]
// at t = (k - 40)/10, b = 0.22, to floating-point precision.
//
// Design choices: the edge value +5 keeps the sign of the original h[0];
// an alternative version of the set uses -4, so EDGE_COEF is exposed. Input
// width 8 bits, spreading factor 31, chip amplitude 56 (largest that keeps
// the transmitted sample within 8 bits) and the LFSR polynomial are this
// design's own choices; 10 samples per chip follows from the coefficients.
package fir_pkg;

  // ---- filter size ---------------------------------------------------------
  localparam int NTAPS      = 81;             // 80-tap filter, 81 coefficients
  localparam int HALF       = (NTAPS + 1) / 2; // 41 distinct coefficients
  localparam int SCALE_LOG2 = 3;              // scaling constant 8 = 2^3
  localparam int EDGE_COEF  = 5;              // new h[0] and h[80]
  localparam int IN_W       = 8;              // input sample width

  typedef int coef_arr_t [NTAPS];

  // ---- original coefficients h[0] .. h[40] (h[80-k] = h[k]) ----------------
  localparam real ORIG_HALF [HALF] = '{
     0.025436913789522,  0.019828370858788,  0.010470913741668, -0.001858070804008,
    -0.015867752788581, -0.029866753235948, -0.041941835678113, -0.050185743791461,
    -0.052949681951008, -0.049090535518244, -0.038180841068122, -0.020651248853743,
     0.002159164163570,  0.028060281495628,  0.054179880304451,  0.077234870414370,
     0.093882608668519,  0.101118718347263,  0.096679604719143,  0.079403887722045,
     0.049508002269793,  0.008737432184037, -0.039633961065750, -0.090969258049985,
    -0.139594060928141, -0.179260276999505, -0.203709791643149, -0.207286736217459,
    -0.185538936372068, -0.135746967140597, -0.057323524246516,  0.047963666933783,
     0.175976346989898,  0.320408918996059,  0.473200159142286,  0.625122157214771,
     0.766496724296835,  0.887975644578479,  0.981313446365383,  1.040060731588741,
     1.060112699841736
  };

  // Round half away from zero.
  function automatic int round_real(real v);
    real a;
    a = (v < 0.0) ? -v : v;
    round_real = int'($floor(a + 0.5));
    if (v < 0.0) round_real = -round_real;
  endfunction

  // Scale, round, fix the edge coefficients and mirror the half response.
  function automatic coef_arr_t modified_coefs(int scale_log2, int edge_coef);
    coef_arr_t c;
    for (int k = 0; k < HALF; k++) begin
      c[k]           = round_real(ORIG_HALF[k] * real'(1 << scale_log2));
      c[NTAPS-1-k]   = c[k];
    end
    c[0]       = edge_coef;
    c[NTAPS-1] = edge_coef;
    return c;
  endfunction

  function automatic int count_nonzero(coef_arr_t c);
    count_nonzero = 0;
    for (int k = 0; k < NTAPS; k++)
      if (c[k] != 0) count_nonzero++;
  endfunction

  function automatic int sum_abs(coef_arr_t c);
    sum_abs = 0;
    for (int k = 0; k < NTAPS; k++)
      sum_abs += (c[k] < 0) ? -c[k] : c[k];
  endfunction

  // Bits of a signed number that can hold +/-v.
  function automatic int signed_bits(int v);
    signed_bits = $clog2(v + 1) + 1;
  endfunction

  localparam coef_arr_t DEFAULT_COEFS = modified_coefs(SCALE_LOG2, EDGE_COEF);

  // Partial-sum width: largest bit-plane sum is the sum of |h[k]|.
  localparam int PS_W  = signed_bits(sum_abs(DEFAULT_COEFS));
  localparam int ACC_W = PS_W + IN_W;

  // ---- CDMA link -----------------------------------------------------------
  localparam int SPC      = 10;   // filter samples per chip (= per symbol of the filter)
  localparam int SF       = 31;   // chips per data bit (one PN period)
  localparam int PN_DEG   = 5;    // LFSR length
  localparam logic [PN_DEG-1:0] PN_TAPS = 5'b00101; // a[n+5] = a[n] ^ a[n+2]
  localparam int CHIP_AMP = 56;   // impulse amplitude for one chip
  localparam int Y_W      = ACC_W - SCALE_LOG2; // normalised filter output width

endpackage
