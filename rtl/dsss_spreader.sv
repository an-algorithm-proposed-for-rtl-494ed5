// dsss_spreader: direct-sequence spreading and impulse generation for the
// pulse-shaping filter. Each data bit is held for SF chips; the bit is
// multiplied by the PN chip (in +/-1 form: bit 0 or chip 0 means +1, so the
// product's sign is bit XOR chip) and every chip becomes one impulse of
// height +/-AMP followed by SPC-1 zero samples. The pulse-shaping filter
// turns these impulses into raised-cosine pulses.
// Interface: bit_valid/bit_ready take a data bit; out_valid/out_ready hand
// samples to the filter; pn_advance steps the PN generator after the last
// sample of each chip. A bit is accepted only when the previous one has
// been fully sent; with no bit pending the output simply stalls.
// SF, SPC and AMP are this design's choices (see fir_pkg).
module dsss_spreader #(
  parameter int SF   = fir_pkg::SF,
  parameter int SPC  = fir_pkg::SPC,
  parameter int AMP  = fir_pkg::CHIP_AMP,
  parameter int W    = fir_pkg::IN_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bit_valid,
  output logic                bit_ready,
  input  logic                bit_in,
  input  logic                chip,
  output logic                pn_advance,
  output logic                out_valid,
  input  logic                out_ready,
  output logic signed [W-1:0] out_sample
);

  logic                     busy, data_bit;
  logic [$clog2(SF)-1:0]    chip_cnt;
  logic [$clog2(SPC)-1:0]   samp_cnt;
  logic                     fire, last_samp, last_chip;

  assign bit_ready  = !busy;
  assign out_valid  = busy;
  assign fire       = out_valid && out_ready;
  assign last_samp  = (samp_cnt == ($clog2(SPC))'(SPC-1));
  assign last_chip  = (chip_cnt == ($clog2(SF))'(SF-1));
  assign pn_advance = fire && last_samp;

  always_comb begin
    if (samp_cnt != '0) out_sample = '0;
    else if (data_bit ^ chip) out_sample = -W'(AMP);
    else                      out_sample =  W'(AMP);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      data_bit <= 1'b0;
      chip_cnt <= '0;
      samp_cnt <= '0;
    end else if (!busy) begin
      if (bit_valid) begin
        busy     <= 1'b1;
        data_bit <= bit_in;
        chip_cnt <= '0;
        samp_cnt <= '0;
      end
    end else if (fire) begin
      if (!last_samp) samp_cnt <= samp_cnt + 1'b1;
      else begin
        samp_cnt <= '0;
        if (last_chip) busy <= 1'b0;
        else           chip_cnt <= chip_cnt + 1'b1;
      end
    end
  end

  initial assert (AMP < (1 << (W-1))) else $error("dsss_spreader: AMP does not fit W bits");

endmodule
