// pn_generator: pseudorandom signature sequence for direct-sequence
// spreading. A Fibonacci LFSR of DEG bits: the output chip is state[0]; on
// each advance the register shifts right and takes the XOR of the bits
// selected by TAPS. The default (a[n+5] = a[n] xor a[n+2], polynomial
// x^5 + x^2 + 1) is primitive, so the sequence is an m-sequence of period 31.
// Transmitter and receiver each hold one generator with the same seed, so
// they produce the same code. Polynomial, length and seed are this design's
// choices. Interface: chip is valid in every cycle; advance moves to the
// next chip at the clock edge. Reset loads SEED (must be non-zero).
module pn_generator #(
  parameter int              DEG  = fir_pkg::PN_DEG,
  parameter logic [DEG-1:0]  TAPS = fir_pkg::PN_TAPS,
  parameter logic [DEG-1:0]  SEED = '1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic advance,
  output logic chip
);

  logic [DEG-1:0] state;

  assign chip = state[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       state <= SEED;
    else if (advance) state <= {^(state & TAPS), state[DEG-1:1]};
  end

  initial assert (SEED != '0) else $error("pn_generator: SEED must be non-zero");

endmodule
