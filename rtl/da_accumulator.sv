// da_accumulator: shift-and-add accumulator of bit-serial distributed
// arithmetic. The input samples are two's complement, so a sample is
//   x = -x[B-1]*2^(B-1) + sum_{b<B-1} x[b]*2^b
// and the filter output is y = -Z_{B-1}*2^(B-1) + sum_{b<B-1} Z_b*2^b.
// The partial sums arrive most significant bit first: the first one (the
// sign bit plane, flagged by `first`) is loaded negated, every later one is
// added to twice the running value. After B enabled cycles acc holds y
// exactly; no bits are dropped. MSB-first order is this design's choice (it
// needs a left shift only and no fractional guard bits).
// Timing: acc updates on each clock edge with en high.
module da_accumulator #(
  parameter int PS_W  = fir_pkg::PS_W,
  parameter int ACC_W = fir_pkg::ACC_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    first,
  input  logic signed [PS_W-1:0]  z,
  output logic signed [ACC_W-1:0] acc
);

  logic signed [ACC_W-1:0] z_ext;
  assign z_ext = ACC_W'(z);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      acc <= '0;
    else if (en) begin
      if (first)     acc <= -z_ext;
      else           acc <= (acc <<< 1) + z_ext;
    end
  end

endmodule
