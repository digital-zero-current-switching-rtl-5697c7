// autotuner: per-tank on-time tuning loop of the lock-in controller.
//
// Each switching cycle the sampling block delivers one ZCD reading per tank.
// The readings are first registered (input flip-flops), then each tank's
// compensator proposes the next on-time (early: longer, late: shorter, ZCS:
// unchanged) and each tank's shift-register LPF passes a proposal to the tune
// output tpulse[x] only after 'lpf_depth' identical proposals in a row. All
// tanks are tuned independently, so mismatched resonators each get their own
// on-time. The lock-detect logic raises 'locked' once every tank has seen
// 'lpf_depth' ZCS readings in a row and drops it on any non-ZCS reading.
//
// The structure (flip-flops, compensator, LPF, lock logic) follows the
// controller. The lock criterion, the hold/load controls and the reset value
// (init_ton) are this design's choices.
//
// Interface: samp/samp_valid from the sampling block (one strobe for all
// tanks); hold ignores readings (used during delay estimation); load resets
// every tank to init_ton. Latency from samp_valid to a new tpulse: 3 clocks
// once the LPF agrees.
`timescale 1ns / 1ps
module autotuner
  import lockin_pkg::*;
#(
  parameter int unsigned N_TANKS   = 2,
  parameter int unsigned DEPTH_MAX = 8,
  parameter ton_t        TON_MIN   = mk_ton(8'd2, 8'd0),
  parameter ton_t        TON_MAX   = mk_ton(8'd250, 8'd0)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  zcd_t       samp [N_TANKS],
  input  logic       samp_valid,
  input  logic       hold,
  input  logic       load,
  input  ton_t       init_ton,
  input  ton_t       step,
  input  logic [3:0] lpf_depth,
  output ton_t       tpulse [N_TANKS],
  output logic [N_TANKS-1:0] tuned,   // pulse: tank's tune value changed
  output logic       locked
);

  zcd_t samp_q [N_TANKS];
  logic valid_q;

  // Input flip-flops.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_TANKS; i++) samp_q[i] <= ZCD_ZCS;
      valid_q <= 1'b0;
    end else begin
      for (int i = 0; i < N_TANKS; i++) samp_q[i] <= samp[i];
      valid_q <= samp_valid && !hold && !load;
    end
  end

  ton_t       t_x     [N_TANKS];
  logic       t_valid [N_TANKS];
  logic       is_zcs  [N_TANKS];
  logic       upd     [N_TANKS];
  logic [3:0] zcs_run [N_TANKS];

  for (genvar g = 0; g < N_TANKS; g++) begin : g_tank
    compensator #(.TON_MIN(TON_MIN), .TON_MAX(TON_MAX)) u_comp (
      .clk, .rst_n,
      .samp(samp_q[g]), .samp_valid(valid_q), .tpulse(tpulse[g]), .step,
      .t_x(t_x[g]), .t_valid(t_valid[g]), .is_zcs(is_zcs[g])
    );

    tune_lpf #(.DEPTH_MAX(DEPTH_MAX)) u_lpf (
      .clk, .rst_n, .load, .init_t(init_ton),
      .t_x(t_x[g]), .t_valid(t_valid[g] && !load), .depth(lpf_depth),
      .tpulse(tpulse[g]), .updated(upd[g])
    );

    // Lock-detect: run length of consecutive ZCS readings, saturating.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) zcs_run[g] <= '0;
      else if (load) zcs_run[g] <= '0;
      else if (t_valid[g]) begin
        if (!is_zcs[g]) zcs_run[g] <= '0;
        else if (zcs_run[g] != 4'hF) zcs_run[g] <= zcs_run[g] + 4'd1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N_TANKS; i++) tuned[i] = upd[i];
  end

  always_comb begin
    locked = 1'b1;
    for (int i = 0; i < N_TANKS; i++)
      if (zcs_run[i] < lpf_depth || lpf_depth == 4'd0) locked = 1'b0;
  end

endmodule
