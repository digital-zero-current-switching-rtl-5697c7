// sequencer: switching sequencer of the multi-tank resonant converter.
//
// A switching cycle has two phases, charge and discharge. Both phases start
// for all tanks together. In each phase, tank x's gate is on for its own
// on-time ton[x] (coarse clocks from the counter, then the fine extension of
// an hr_timer delay line), so every tank can switch at its own current zero.
// The phase ends after the longest tank's coarse on-time, one extra clock
// that covers every fine extension, and dt_cycles clocks of deadtime; the
// total switching period thus follows the slowest tank, and no charge gate
// can overlap a discharge gate. The same on-time is used in both phases of a
// tank (both phases see the same L and C).
//
// Tune registers: ton[] (and the deadtime) are copied into ton_act[] only at
// the start of a switching cycle, so a sequence always runs to completion with one set of
// values. When 'run' drops, the sequencer finishes the cycle in progress
// (through the discharge phase and its deadtime) and then stops with all gates
// off; 'busy' is high while a cycle is in progress.
//
// Counter, computational block, per-tank delay-line stage, tune registers and
// the phase structure follow the controller; the +1 clock guard, the exact
// deadtime count and the minimum coarse value of one clock are this design's.
//
// Outputs for the sampling block (all registered, clk domain): off_evt[x]
// rises on the clock edge where tank x's coarse charge pulse falls (its
// turn-off command), chg_end pulses in the last clock of the charge phase's
// deadtime, cycle_start pulses in the first clock of every cycle.
`timescale 1ns / 1ps
module sequencer
  import lockin_pkg::*;
#(
  parameter int unsigned N_TANKS  = 2,
  parameter real         T_BUF_NS = 0.2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,
  input  ton_t       ton [N_TANKS],
  input  logic [3:0] dt_cycles,
  output ton_t       ton_act [N_TANKS],
  output logic [N_TANKS-1:0] gate_chg,
  output logic [N_TANKS-1:0] gate_dis,
  output logic [N_TANKS-1:0] off_evt,
  output logic       chg_end,
  output logic       cycle_start,
  output logic       phase_dis,
  output logic       busy
);

  logic [COARSE_BITS+4:0] cnt;        // clocks since phase start
  logic [COARSE_BITS+4:0] phase_len;  // computational block result
  logic [COARSE_BITS-1:0] cmax;
  logic [N_TANKS-1:0]     coarse_q;   // registered coarse pulses
  logic                   active;
  logic [3:0]             dt_act;     // deadtime in use this cycle

  // Computational block: phase length from the longest tank.
  always_comb begin
    cmax = '0;
    for (int i = 0; i < N_TANKS; i++)
      if (ton_act[i].coarse > cmax) cmax = ton_act[i].coarse;
    phase_len = (COARSE_BITS+5)'(cmax) + (COARSE_BITS+5)'(1)
              + (COARSE_BITS+5)'(dt_act);
  end

  wire last = active && (cnt == phase_len - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      active      <= 1'b0;
      phase_dis   <= 1'b0;
      coarse_q    <= '0;
      off_evt     <= '0;
      chg_end     <= 1'b0;
      cycle_start <= 1'b0;
      dt_act      <= 4'd1;
      for (int i = 0; i < N_TANKS; i++) ton_act[i] <= mk_ton(8'd1, 8'd0);
    end else begin
      chg_end     <= 1'b0;
      cycle_start <= 1'b0;
      off_evt     <= '0;
      if (!active) begin
        coarse_q <= '0;
        if (run) begin
          // start a new cycle: load the tune registers
          for (int i = 0; i < N_TANKS; i++) begin
            ton_act[i] <= ton[i];
            if (ton[i].coarse == '0) ton_act[i].coarse <= 8'd1;
          end
          dt_act      <= dt_cycles;
          active      <= 1'b1;
          phase_dis   <= 1'b0;
          cnt         <= '0;
          cycle_start <= 1'b1;
          coarse_q    <= '1;
        end
      end else begin
        if (last) begin
          cnt <= '0;
          if (!phase_dis) begin
            phase_dis <= 1'b1;
            coarse_q  <= '1;
          end else if (run) begin
            phase_dis <= 1'b0;
            cycle_start <= 1'b1;
            dt_act <= dt_cycles;
            for (int i = 0; i < N_TANKS; i++) begin
              ton_act[i] <= ton[i];
              if (ton[i].coarse == '0) ton_act[i].coarse <= 8'd1;
            end
            coarse_q <= '1;
          end else begin
            active   <= 1'b0;
            coarse_q <= '0;
          end
        end else begin
          cnt <= cnt + 1'b1;
          for (int i = 0; i < N_TANKS; i++) begin
            if (coarse_q[i] && (cnt + 1'b1 == (COARSE_BITS+5)'(ton_act[i].coarse))) begin
              coarse_q[i] <= 1'b0;
              off_evt[i]  <= !phase_dis;
            end
          end
        end
        chg_end <= !phase_dis && (cnt == phase_len - (COARSE_BITS+5)'(2));
      end
    end
  end

  assign busy = active;

  // High-resolution timer units: charge and discharge gate of every tank.
  for (genvar g = 0; g < N_TANKS; g++) begin : g_hr
    logic c_chg, c_dis;
    assign c_chg = coarse_q[g] && !phase_dis;
    assign c_dis = coarse_q[g] &&  phase_dis;
    hr_timer #(.SEL_W(FINE_BITS), .T_BUF_NS(T_BUF_NS)) u_hr_chg (
      .coarse(c_chg), .sel(ton_act[g].fine), .q(gate_chg[g]));
    hr_timer #(.SEL_W(FINE_BITS), .T_BUF_NS(T_BUF_NS)) u_hr_dis (
      .coarse(c_dis), .sel(ton_act[g].fine), .q(gate_dis[g]));
  end

  // Protection: charge and discharge gates of the converter never overlap.
  always @(gate_chg or gate_dis)
    assert (!(|gate_chg && |gate_dis))
      else $error("sequencer: charge and discharge gates overlap");

endmodule
