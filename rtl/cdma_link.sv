// cdma_link: the direct-sequence CDMA link built around the multiplierless
// pulse-shaping filter, with its matched filter at the receiver.
// Transmitter: data bits -> dsss_spreader (PN spreading, one impulse of
// +/-CHIP_AMP per chip, SPC samples per chip) -> da_fir (81-coefficient
// square-root raised-cosine filter with the reduced coefficient set,
// distributed arithmetic) -> normalised, saturated to IN_W bits -> tx_sample.
// Receiver: rx_sample (IN_W bits, the digitised channel output) -> da_fir
// (matched filter: the same symmetric coefficients) -> despreader (samples
// each chip at the peak of the combined response, correlates with its own
// PN generator, decides the bit).
// Mode: mf_en = 1 uses the receive matched filter (the despreader then
// skips the group delay of both filters, NTAPS-1 samples); mf_en = 0
// bypasses it, so pulse shaping is at the transmitter only (skip
// (NTAPS-1)/2 samples). mf_en must be held constant from reset on.
// The channel (noise, sinusoidal interference) is outside the design, so the
// transmitter output and the receiver input are separate ports; in a
// loop-back test rx_sample = tx_sample.
// Timing: the filters take one sample every IN_W+1 cycles, so one data bit
// occupies SF*SPC*(IN_W+1) cycles (31*10*9 = 2790 by default). rx_valid
// must not come more often than one sample per IN_W+1 cycles (tx_valid
// never does). A bit's decision appears only after the filter tails of the
// following bit have been received.
module cdma_link #(
  parameter int SF    = fir_pkg::SF,
  parameter int SPC   = fir_pkg::SPC,
  parameter int IN_W  = fir_pkg::IN_W,
  parameter int NTAPS = fir_pkg::NTAPS,
  localparam int Y_W  = fir_pkg::PS_W + IN_W - fir_pkg::SCALE_LOG2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       mf_en,
  // data bits in
  input  logic                       tx_bit_valid,
  output logic                       tx_bit_ready,
  input  logic                       tx_bit,
  // transmitted samples to the channel
  output logic                       tx_valid,
  output logic signed [IN_W-1:0]     tx_sample,
  // received samples from the channel
  input  logic                       rx_valid,
  input  logic signed [IN_W-1:0]     rx_sample,
  // decided bits out
  output logic                       rx_bit_valid,
  output logic                       rx_bit,
  output logic signed [Y_W+$clog2(SF):0] rx_corr
);

  localparam int ACC_W = fir_pkg::PS_W + IN_W;
  localparam logic signed [Y_W-1:0] SAT_MAX = Y_W'((1 << (IN_W-1)) - 1);
  localparam logic signed [Y_W-1:0] SAT_MIN = -Y_W'(1 << (IN_W-1));

  logic                   tx_chip, tx_pn_adv;
  logic                   sp_valid, fir_ready;
  logic signed [IN_W-1:0] sp_sample;
  logic signed [ACC_W-1:0] tx_full, mf_full;
  logic signed [Y_W-1:0]  tx_norm, mf_norm;
  logic                   mf_in_ready, mf_valid;
  logic                   rx_chip, rx_pn_adv;
  logic                   ds_valid;
  logic signed [Y_W-1:0]  ds_sample;

  // ---- transmitter ----------------------------------------------------------
  pn_generator u_tx_pn (.clk, .rst_n, .advance(tx_pn_adv), .chip(tx_chip));

  dsss_spreader #(.SF(SF), .SPC(SPC), .W(IN_W)) u_spread (
    .clk, .rst_n,
    .bit_valid(tx_bit_valid), .bit_ready(tx_bit_ready), .bit_in(tx_bit),
    .chip(tx_chip), .pn_advance(tx_pn_adv),
    .out_valid(sp_valid), .out_ready(fir_ready), .out_sample(sp_sample)
  );

  da_fir #(.NTAPS(NTAPS), .IN_W(IN_W)) u_fir (
    .clk, .rst_n,
    .in_valid(sp_valid), .in_ready(fir_ready), .in_sample(sp_sample),
    .out_valid(tx_valid), .out_y(tx_full), .out_y_norm(tx_norm)
  );

  // Saturate to the transmit word; with the default amplitude it never clips.
  always_comb begin
    if (tx_norm > SAT_MAX)      tx_sample = IN_W'(SAT_MAX);
    else if (tx_norm < SAT_MIN) tx_sample = IN_W'(SAT_MIN);
    else                        tx_sample = IN_W'(tx_norm);
  end

  // ---- receiver -------------------------------------------------------------
  da_fir #(.NTAPS(NTAPS), .IN_W(IN_W)) u_mf (
    .clk, .rst_n,
    .in_valid(rx_valid && mf_en), .in_ready(mf_in_ready), .in_sample(rx_sample),
    .out_valid(mf_valid), .out_y(mf_full), .out_y_norm(mf_norm)
  );

  assign ds_valid  = mf_en ? mf_valid : rx_valid;
  assign ds_sample = mf_en ? mf_norm  : Y_W'(rx_sample);

  pn_generator u_rx_pn (.clk, .rst_n, .advance(rx_pn_adv), .chip(rx_chip));

  despreader #(.SF(SF), .SPC(SPC), .W(Y_W)) u_despread (
    .clk, .rst_n,
    .delay(mf_en ? 8'(NTAPS - 1) : 8'((NTAPS - 1) / 2)),
    .in_valid(ds_valid), .in_sample(ds_sample),
    .chip(rx_chip), .pn_advance(rx_pn_adv),
    .bit_valid(rx_bit_valid), .bit_out(rx_bit), .corr(rx_corr)
  );

  // The matched filter accepts one sample per IN_W+1 cycles; faster input
  // would be lost.
  a_rx_rate: assert property (@(posedge clk) disable iff (!rst_n)
                              (rx_valid && mf_en) |-> mf_in_ready)
    else $error("cdma_link: rx sample arrived while the matched filter was busy");

  // Exact filter outputs are kept for observation only.
  logic unused_full;
  assign unused_full = ^{tx_full, mf_full};

endmodule
