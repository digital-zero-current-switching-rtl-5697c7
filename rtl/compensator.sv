// compensator: digital compensator of one resonant tank (part of the
// autotuner).
//
// For every valid ZCD reading taken after the tank's turn-off it proposes the
// next on-time T_x: the present tune value plus 'step' when the reading says
// early switching, minus 'step' when it says late switching, and unchanged
// when it says ZCS (or gives no information). The proposal is clamped to
// [TON_MIN, TON_MAX]. The increase/decrease/hold rule is the controller's;
// the step size is an input so that the governor can use a large step during
// lock-in and the smallest one afterwards (this design's choice), and the
// clamp limits are this design's.
//
// Timing: t_x and t_valid are registered and appear one clock after
// samp_valid; is_zcs marks a proposal that came from a ZCS reading.
`timescale 1ns / 1ps
module compensator
  import lockin_pkg::*;
#(
  parameter ton_t TON_MIN = mk_ton(8'd2, 8'd0),
  parameter ton_t TON_MAX = mk_ton(8'd250, 8'd0)
) (
  input  logic clk,
  input  logic rst_n,
  input  zcd_t samp,
  input  logic samp_valid,
  input  ton_t tpulse,   // present tune value (LPF output)
  input  ton_t step,
  output ton_t t_x,
  output logic t_valid,
  output logic is_zcs
);

  ton_t next_t;

  always_comb begin
    unique case (samp)
      ZCD_EARLY: next_t = ton_clamp(ton_add(tpulse, step), TON_MIN, TON_MAX);
      ZCD_LATE:  next_t = ton_clamp(ton_sub(tpulse, step), TON_MIN, TON_MAX);
      default:   next_t = tpulse;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_x     <= '0;
      t_valid <= 1'b0;
      is_zcs  <= 1'b0;
    end else begin
      t_valid <= samp_valid;
      if (samp_valid) begin
        t_x    <= next_t;
        is_zcs <= (samp == ZCD_ZCS);
      end
    end
  end

endmodule
