// da_partial_sum: the per-bit-plane sum of distributed arithmetic.
// For one bit position b of the input samples it forms
//   Z_b = sum over k of h[k] * x_k[b]
// i.e. the sum of the coefficients of all taps whose bit b is one. A basic
// DA filter reads Z_b from a 2^NTAPS-entry look-up table; here it is
// computed on the fly by adding the selected coefficients, and only the
// non-zero coefficients are wired in. With the modified coefficient set
// (43 non-zero out of 81) that is 42 additions per bit plane instead of 80,
// which is the saving the coefficient-reduction procedure aims at.
// Interface: bits[k] is bit b of tap k; z is the signed sum. Purely
// combinational.
module da_partial_sum #(
  parameter int                NTAPS = fir_pkg::NTAPS,
  parameter int                PS_W  = fir_pkg::PS_W,
  parameter fir_pkg::coef_arr_t COEFS = fir_pkg::DEFAULT_COEFS
) (
  input  logic                   bits [NTAPS],
  output logic signed [PS_W-1:0] z
);

  always_comb begin
    z = '0;
    for (int k = 0; k < NTAPS; k++) begin
      // Zero coefficients generate no adder at all.
      if (COEFS[k] != 0 && bits[k]) z = z + PS_W'(COEFS[k]);
    end
  end

endmodule
