// da_fir: multiplierless pulse-shaping FIR filter
//   y[n] = sum_{k=0}^{NTAPS-1} h[k] * x[n-k]
// built with bit-serial distributed arithmetic and the reduced coefficient
// set (integers in units of 2^-SCALE_LOG2, see fir_pkg). A sample accepted
// on the in_valid/in_ready handshake enters the delay line; then, for each
// bit position from MSB to LSB, one bit of every tap is fed to the
// partial-sum adder, whose result is shift-accumulated. No multiplier is
// used and only the non-zero coefficients cost adders.
// Outputs: out_y is the exact result in coefficient units (y * 2^SCALE_LOG2);
// out_y_norm divides it back by the scaling constant with an arithmetic
// right shift (truncation towards minus infinity, this design's choice).
// Both are valid while out_valid is high, one cycle per sample.
// Timing: throughput one sample per IN_W+1 cycles; out_valid comes IN_W+1
// cycles after the edge that accepted the sample.
// An elaboration-time check enforces the reduction rule for the two edge
// coefficients: they must be non-zero and smaller than 10 in magnitude.
module da_fir #(
  parameter int                 NTAPS      = fir_pkg::NTAPS,
  parameter int                 IN_W       = fir_pkg::IN_W,
  parameter int                 SCALE_LOG2 = fir_pkg::SCALE_LOG2,
  parameter fir_pkg::coef_arr_t COEFS      = fir_pkg::DEFAULT_COEFS,
  parameter int                 PS_W       = fir_pkg::PS_W,
  parameter int                 ACC_W      = PS_W + IN_W
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  output logic                               in_ready,
  input  logic signed [IN_W-1:0]             in_sample,
  output logic                               out_valid,
  output logic signed [ACC_W-1:0]            out_y,
  output logic signed [ACC_W-SCALE_LOG2-1:0] out_y_norm
);

  logic signed [IN_W-1:0] taps [NTAPS];
  logic                   bits [NTAPS];
  logic                   shift_en, acc_en, acc_first;
  logic [$clog2(IN_W)-1:0] bit_idx;
  logic signed [PS_W-1:0] z;

  da_controller #(.B(IN_W)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .shift_en, .bit_idx,
    .acc_en, .acc_first, .done(out_valid)
  );

  tap_delay_line #(.NTAPS(NTAPS), .W(IN_W)) u_taps (
    .clk, .rst_n, .shift_en, .din(in_sample), .taps
  );

  always_comb
    for (int k = 0; k < NTAPS; k++) bits[k] = taps[k][bit_idx];

  da_partial_sum #(.NTAPS(NTAPS), .PS_W(PS_W), .COEFS(COEFS)) u_ps (
    .bits, .z
  );

  da_accumulator #(.PS_W(PS_W), .ACC_W(ACC_W)) u_acc (
    .clk, .rst_n, .en(acc_en), .first(acc_first), .z, .acc(out_y)
  );

  initial begin
    assert (COEFS[0] != 0 && COEFS[0] > -10 && COEFS[0] < 10 &&
            COEFS[NTAPS-1] != 0 && COEFS[NTAPS-1] > -10 && COEFS[NTAPS-1] < 10)
      else $error("da_fir: edge coefficients must be non-zero and below 10 in magnitude");
  end

  assign out_y_norm = (ACC_W-SCALE_LOG2)'(out_y >>> SCALE_LOG2);

endmodule
