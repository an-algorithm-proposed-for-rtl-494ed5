// tap_delay_line: the filter's chain of delay elements. It holds the last
// NTAPS input samples, taps[k] = x[n-k]. When shift_en is high the chain
// moves by one: taps[0] takes din and every other tap takes its neighbour.
// The whole chain is visible in parallel so the distributed-arithmetic stage
// can pick one bit of every tap in the same cycle.
// Timing: taps change on the clock edge where shift_en is high.
// Reset clears every tap to zero (this design's choice; the filter therefore
// starts from a zero history).
module tap_delay_line #(
  parameter int NTAPS = fir_pkg::NTAPS,
  parameter int W     = fir_pkg::IN_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift_en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] taps [NTAPS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS; k++) taps[k] <= '0;
    end else if (shift_en) begin
      taps[0] <= din;
      for (int k = 1; k < NTAPS; k++) taps[k] <= taps[k-1];
    end
  end

endmodule
