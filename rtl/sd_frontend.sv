// sd_frontend: behavioural model of the analog front end of the single-pin
// sigma-delta converter.
//
// Behavioural model, not synthesizable. It stands for three parts: an
// inverter supplied by the pin voltage V_op and driven by the flip-flop's
// inverted output 'trg' (so its output S_i is V_op while the bit is 1 and 0
// while it is 0), an RC integrator from S_i to the node S_o, and an inverter
// used as comparator whose threshold V_th is the modulator's reference
// (cmp_out = 1 while S_o is below V_th). In the loop with sd_adc the node S_o
// hovers around V_th, and the share of ones in the bit stream is V_th / V_op.
//
// The RC network is integrated with a forward-Euler step of STEP_NS. The
// topology is the converter's; the time constant (1 us, a corner far below
// the 20 MHz clock as required) and the 2.5 V threshold are this model's
// assumptions. Voltages are integers in millivolts; internally microvolts.
`timescale 1ns / 1ps
module sd_frontend #(
  parameter int unsigned V_TH_MV = 2500,
  parameter int unsigned TAU_NS  = 1000,
  parameter int unsigned STEP_NS = 5
) (
  input  int unsigned v_op_mv,   // configuration pin voltage
  input  logic        trg,       // inverted bit from the flip-flop
  output logic        cmp_out
);

  longint so_uv;   // integrator node S_o
  longint si_uv;   // front inverter output S_i

  initial so_uv = 0;

  always_comb si_uv = trg ? 64'sd0 : longint'(v_op_mv) * 1000;

  always begin
    #(STEP_NS);
    so_uv = so_uv + ((si_uv - so_uv) * longint'(STEP_NS)) / longint'(TAU_NS);
  end

  always_comb cmp_out = (so_uv < longint'(V_TH_MV) * 1000);

endmodule
