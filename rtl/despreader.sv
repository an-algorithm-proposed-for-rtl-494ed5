// despreader: receiver correlator. It counts the incoming samples, skips the
// first `delay` of them (the group delay of the filters in front of it, so
// that it samples each pulse at its peak) and then takes every SPC-th sample
// as the chip sample. Each chip sample is multiplied by the local PN chip
// (+1 for chip 0, -1 for chip 1) and accumulated; after SF chips the sign
// of the correlation decides the bit (negative -> 1) and the correlator
// restarts. Only the code of the wanted user adds up coherently; other
// signals, noise and interference stay spread.
// Interface: in_valid/in_sample is the received sample stream (no
// back-pressure); `delay` must be held constant from reset on (the link sets
// it from its filter mode); chip/pn_advance drive a local PN generator;
// bit_valid pulses one cycle with bit_out and the final correlation corr.
// Timing: bit_valid comes on the edge after the SF-th chip sample.
// Chip timing is assumed known from reset (no acquisition or tracking loop),
// a choice of this design.
module despreader #(
  parameter int SF     = fir_pkg::SF,
  parameter int SPC    = fir_pkg::SPC,
  parameter int W      = fir_pkg::Y_W,
  parameter int DW     = 8,
  parameter int CORR_W = W + $clog2(SF) + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [DW-1:0]            delay,
  input  logic                     in_valid,
  input  logic signed [W-1:0]      in_sample,
  input  logic                     chip,
  output logic                     pn_advance,
  output logic                     bit_valid,
  output logic                     bit_out,
  output logic signed [CORR_W-1:0] corr
);

  logic [DW-1:0]            seen;       // samples skipped so far
  logic                     skipping;
  logic [$clog2(SPC)-1:0]   phase;      // position inside a chip
  logic [$clog2(SF)-1:0]    chip_cnt;
  logic signed [CORR_W-1:0] acc, acc_next;
  logic                     take;

  assign skipping   = (seen != delay);
  assign take       = in_valid && !skipping && (phase == '0);
  assign pn_advance = take;
  assign acc_next   = chip ? acc - CORR_W'(in_sample) : acc + CORR_W'(in_sample);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen      <= '0;
      phase     <= '0;
      chip_cnt  <= '0;
      acc       <= '0;
      corr      <= '0;
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      if (in_valid) begin
        if (skipping) seen <= seen + 1'b1;
        else begin
          phase <= (phase == ($clog2(SPC))'(SPC-1)) ? '0 : phase + 1'b1;
          if (take) begin
            if (chip_cnt == ($clog2(SF))'(SF-1)) begin
              chip_cnt  <= '0;
              acc       <= '0;
              corr      <= acc_next;
              bit_out   <= acc_next < 0;
              bit_valid <= 1'b1;
            end else begin
              chip_cnt <= chip_cnt + 1'b1;
              acc      <= acc_next;
            end
          end
        end
      end
    end
  end

  // The skip count must not change while samples are being counted.
  logic [DW-1:0] delay_q;
  always_ff @(posedge clk) delay_q <= delay;
  a_delay_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                   (in_valid || seen != '0) |-> delay == delay_q)
    else $error("despreader: delay changed during operation");

endmodule
