// governor: system governor of the lock-in controller.
//
// It decides the operating mode from the enable input, the configuration
// word OP (read through the single configuration pin) and the autotuner's
// 'locked' flag, following the lock-in procedure: start-up, inherent-delay
// estimation, lock-in, locked running with fine tuning, and a new delay
// estimation every N_est switching cycles. Turning off lets the sequence in
// progress complete before all gates stay low.
//
//   OFF       enable=0; the autotuner is reset to INIT_TON.
//   WAIT_CFG  until the first OP conversion is ready.
//   EST       configuration latched from OP; switching with the short fixed
//             on-time EST_TON (early switching for sure), delay estimator
//             running, autotuner holding its values.
//   LOCKIN    closed loop with the large tuning step LOCKIN_STEP.
//   RUN       'locked': closed loop with the finest step (one delay element);
//             back to LOCKIN if the lock is lost.
//   STOP      enable dropped: wait until the sequencer is idle.
//
// OP layout (this design's choice; the controller only says that the
// deadtime, N_est, the LPF depth and the estimation margin are configurable
// and that OP is a 10-bit level). The level converter is only accurate to a
// few percent, and with the comparator threshold at half the pin's range OP
// runs from 512 (V_op = 2 V_th) to 1023 (V_op = V_th). The settings therefore
// use OP[8:5] only, one bit each, so every setting is a band of 32 codes:
//   OP[8] sampling method: 0 continuous, 1 single sample
//   OP[7] LPF depth: 0 -> 4 compared registers, 1 -> 8
//   OP[6] N_est: 0 -> 256 switching cycles, 1 -> 4096
//   OP[5] deadtime: 0 -> 4 clocks (200 ns), 1 -> 2 clocks (100 ns)
// OP[9] and OP[4:0] are not used. The estimation margin is the parameter
// EST_MARGIN. The configuration is re-read at every delay estimation, so the
// mode can be changed while running. The 20 MHz clock is the IC's; the state
// encoding, the step sizes and the start values are this design's.
//
// est_ton, init_ton and est_margin are constant outputs (their parameters).
// They sit here so that one module owns every value the governor dictates,
// and a version with more configuration bits would drive them from OP.
//
// Timing: all outputs are registered or decoded from the state register and
// the latched configuration; est_start is a one-clock pulse on entry to EST.
`timescale 1ns / 1ps
module governor
  import lockin_pkg::*;
#(
  parameter ton_t INIT_TON    = mk_ton(8'd20, 8'd0),   // 1.0 us
  parameter ton_t EST_TON     = mk_ton(8'd12, 8'd0),   // 0.6 us
  parameter ton_t LOCKIN_STEP = mk_ton(8'd0, 8'd25),   // 5 ns
  parameter ton_t FINE_STEP   = mk_ton(8'd0, 8'd1),    // 200 ps
  parameter ton_t EST_MARGIN  = mk_ton(8'd0, 8'd5)     // 1 ns
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic [9:0] op,
  input  logic       op_valid,
  input  logic       locked,
  input  logic       est_done,
  input  logic       cycle_start,
  input  logic       seq_busy,
  output gov_state_t state,
  output logic       seq_run,
  output logic       force_est_ton,
  output ton_t       est_ton,
  output logic       tuner_hold,
  output logic       tuner_load,
  output ton_t       init_ton,
  output logic       est_start,
  output ton_t       step,
  output logic [3:0] dt_cycles,
  output logic [3:0] lpf_depth,
  output logic       samp_mode,
  output ton_t       est_margin
);

  logic [9:0]  cfg;
  logic [15:0] cyc_cnt;
  logic [15:0] n_est;

  assign dt_cycles  = cfg[5] ? 4'd2 : 4'd4;
  assign n_est      = cfg[6] ? 16'd4096 : 16'd256;
  assign lpf_depth  = cfg[7] ? 4'd8 : 4'd4;
  assign est_margin = EST_MARGIN;
  assign est_ton    = EST_TON;
  assign init_ton   = INIT_TON;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= GOV_OFF;
      cfg       <= '0;
      cyc_cnt   <= '0;
      est_start <= 1'b0;
    end else begin
      est_start <= 1'b0;
      unique case (state)
        GOV_OFF:      if (enable) state <= GOV_WAIT_CFG;
        GOV_WAIT_CFG: if (!enable) state <= GOV_OFF;
                      else if (op_valid) begin
                        cfg       <= op;
                        est_start <= 1'b1;
                        state     <= GOV_EST;
                      end
        GOV_EST:      if (!enable) state <= GOV_STOP;
                      else if (est_done && !est_start) begin
                        cyc_cnt <= '0;
                        state   <= GOV_LOCKIN;
                      end
        GOV_LOCKIN, GOV_RUN: begin
          if (!enable) state <= GOV_STOP;
          else if (cycle_start && cyc_cnt + 16'd1 >= n_est) begin
            cfg       <= op;          // re-read the configuration
            est_start <= 1'b1;
            state     <= GOV_EST;
          end else begin
            if (cycle_start) cyc_cnt <= cyc_cnt + 16'd1;
            state <= locked ? GOV_RUN : GOV_LOCKIN;
          end
        end
        GOV_STOP:     if (!seq_busy) state <= GOV_OFF;
        default:      state <= GOV_OFF;
      endcase
    end
  end

  always_comb begin
    seq_run       = state inside {GOV_EST, GOV_LOCKIN, GOV_RUN};
    force_est_ton = (state == GOV_EST);
    tuner_hold    = (state == GOV_EST);
    tuner_load    = (state == GOV_OFF);
    step          = (state == GOV_RUN) ? FINE_STEP : LOCKIN_STEP;
    samp_mode     = (state == GOV_EST) ? 1'b1 : cfg[8];
  end

endmodule
