// lockin_controller: zero-current-switching lock-in controller for a 4:1
// switched-tank converter (two resonant tanks, ten power switches Q1..Q10).
//
// The controller finds, on the fly, the on-time at which each tank's resonant
// current crosses zero and keeps every turn-off there. Each switching cycle:
//   1. the sequencer drives the charge phase and then the discharge phase;
//      each tank's gates stay on for that tank's own tuned on-time
//      (20 MHz counter plus a 200 ps delay-line fine stage);
//   2. after each tank's charge turn-off, the sampling block reads that
//      tank's ZCD sensor (early / ZCS / late);
//   3. the autotuner lengthens the on-time after early switching and
//      shortens it after late switching, through an LPF that needs several
//      identical proposals in a row.
// The governor runs the procedure: wait for the configuration from the
// single-pin sigma-delta converter, measure the inherent gate delay, lock in
// with a large step, then fine-tune with a one-element step, and repeat the
// delay measurement every N_est cycles.
//
// Gate map of the 4:1 switched-tank converter (charge / discharge phase):
//   tank 1 charge: Q1, Q5      tank 1 discharge: Q2, Q6, Q7
//   tank 2 charge: Q3, Q8, Q9  tank 2 discharge: Q4, Q10
// q[i-1] drives Qi.
//
// The two ZCD sensors and the analog half of the sigma-delta converter are
// behavioural models (voltages as integer millivolts), so the top can be
// simulated against a model of the power stage. Everything else is
// synthesizable except the delay lines, which are behavioural models of
// buffer chains.
`timescale 1ns / 1ps
module lockin_controller
  import lockin_pkg::*;
#(
  // on-time every tank starts from at power-up (programmable start value)
  parameter ton_t INIT_TON = mk_ton(8'd20, 8'd0)   // 1.0 us
) (
  input  logic        clk,          // 20 MHz internal clock
  input  logic        rst_n,
  input  logic        enable,
  input  int unsigned v_op_mv,      // configuration pin voltage
  input  int unsigned v_out_mv,     // converter output voltage
  input  int          v_sw1_mv,     // switching node of tank 1
  input  int          v_sw2_mv,     // switching node of tank 2
  output logic [9:0]  q,            // gate commands Q1..Q10
  output logic        locked,
  output gov_state_t  state,
  output logic [9:0]  op,
  output ton_t        tpulse [2],   // tuned on-times
  output ton_t        ds [2],       // estimated sampling delays
  output logic [1:0]  tuned,        // pulse: a tank's on-time changed
  output logic        samp_valid,
  output zcd_t        samp [2],
  output logic        est_timeout
);

  localparam int unsigned N = 2;

  // ---------------- single-pin configuration ----------------
  logic cmp_out, trg, bitstream, op_valid, op_new;

  sd_frontend u_sdfe (.v_op_mv, .trg, .cmp_out);

  sd_adc #(.N_BITS(10)) u_sdadc (
    .clk, .rst_n, .cmp_in(cmp_out), .bitstream, .trg, .op, .op_valid, .op_new);

  // ---------------- ZCD sensors (off-chip) ----------------
  logic [1:0] zcd [N];

  zcd_sensor u_zcd1 (.v_sw_mv(v_sw1_mv), .v_out_mv, .zcd(zcd[0]));
  zcd_sensor u_zcd2 (.v_sw_mv(v_sw2_mv), .v_out_mv, .zcd(zcd[1]));

  // ---------------- governor ----------------
  logic       seq_run, force_est_ton, tuner_hold, tuner_load, est_start;
  logic       samp_mode, est_done, cycle_start, seq_busy;
  ton_t       est_ton, init_ton, step, est_margin;
  logic [3:0] dt_cycles, lpf_depth;

  governor #(.INIT_TON(INIT_TON)) u_gov (
    .clk, .rst_n, .enable, .op, .op_valid, .locked, .est_done, .cycle_start,
    .seq_busy, .state, .seq_run, .force_est_ton, .est_ton, .tuner_hold,
    .tuner_load, .init_ton, .est_start, .step, .dt_cycles, .lpf_depth,
    .samp_mode, .est_margin);

  // ---------------- sequencer ----------------
  ton_t           ton_seq [N];
  ton_t           ton_act [N];
  logic [N-1:0]   gate_chg, gate_dis, off_evt;
  logic           chg_end, phase_dis;

  always_comb
    for (int i = 0; i < N; i++) ton_seq[i] = force_est_ton ? est_ton : tpulse[i];

  sequencer #(.N_TANKS(N)) u_seq (
    .clk, .rst_n, .run(seq_run), .ton(ton_seq), .dt_cycles, .ton_act,
    .gate_chg, .gate_dis, .off_evt, .chg_end, .cycle_start, .phase_dis,
    .busy(seq_busy));

  assign q[0] = gate_chg[0];   // Q1
  assign q[4] = gate_chg[0];   // Q5
  assign q[2] = gate_chg[1];   // Q3
  assign q[7] = gate_chg[1];   // Q8
  assign q[8] = gate_chg[1];   // Q9
  assign q[1] = gate_dis[0];   // Q2
  assign q[5] = gate_dis[0];   // Q6
  assign q[6] = gate_dis[0];   // Q7
  assign q[3] = gate_dis[1];   // Q4
  assign q[9] = gate_dis[1];   // Q10

  // ---------------- sampling block ----------------
  sampling_block #(.N_TANKS(N)) u_samp (
    .clk, .rst_n, .mode(samp_mode), .ton(ton_act), .ds, .off_evt, .chg_end,
    .zcd, .samp, .samp_valid);

  // ---------------- delay estimation ----------------
  delay_estimator #(.N_TANKS(N)) u_est (
    .clk, .rst_n, .start(est_start), .margin(est_margin), .samp, .samp_valid,
    .ds, .done(est_done), .timeout(est_timeout));

  // ---------------- autotuner ----------------
  autotuner #(.N_TANKS(N)) u_tune (
    .clk, .rst_n, .samp, .samp_valid, .hold(tuner_hold), .load(tuner_load),
    .init_ton, .step, .lpf_depth, .tpulse, .tuned, .locked);

endmodule
