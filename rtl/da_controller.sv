// da_controller: sequencer of the bit-serial distributed-arithmetic filter.
// In IDLE it is ready for a sample; accepting one (in_valid && in_ready)
// shifts the delay line. It then runs B bit cycles, most significant bit
// first, driving bit_idx, acc_en and acc_first (high on the sign-bit cycle).
// The cycle after the last bit it pulses done, when the accumulator holds
// the filter output; it is ready again in that same cycle.
// Timing: one sample per B+1 clock cycles; done comes B+1 cycles after the
// accepting edge. The handshake and the one-cycle load are this design's
// choices.
module da_controller #(
  parameter int B = fir_pkg::IN_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  output logic                 shift_en,
  output logic [$clog2(B)-1:0] bit_idx,
  output logic                 acc_en,
  output logic                 acc_first,
  output logic                 done
);

  typedef enum logic {IDLE, BITS} state_t;
  state_t state;

  assign in_ready  = (state == IDLE);
  assign shift_en  = in_valid && in_ready;
  assign acc_en    = (state == BITS);
  assign acc_first = (state == BITS) && (bit_idx == ($clog2(B))'(B-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      bit_idx <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (shift_en) begin
          state   <= BITS;
          bit_idx <= ($clog2(B))'(B-1);
        end
        BITS: begin
          if (bit_idx == '0) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            bit_idx <= bit_idx - 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
