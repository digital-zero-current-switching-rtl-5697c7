// stc_bench: one controller with two tank models, run through start-up,
// delay estimation and lock-in for one set of tank values; used by
// tb_workloads. It reports, once the controller has been locked for 40
// switching cycles, whether both on-times sit inside the ZCS window of their
// tank, whether the estimated delay of both tanks is the first delay-line
// element past the inherent delay plus the 5-element margin, and how many
// early and late readings the tuning went through.
`timescale 1ns / 1ps
module stc_bench
  import lockin_pkg::*;
#(
  parameter real  TH1      = 1274.2,   // half period of tank 1, ns
  parameter real  TH2      = 1274.2,   // half period of tank 2, ns
  parameter real  DLY      = 61.3,     // inherent delay, ns
  parameter ton_t INIT_TON = mk_ton(8'd20, 8'd0),
  parameter int unsigned V_OP_MV = 4848
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output logic ok,
  output logic ds_ok,
  output int   n_early,
  output int   n_late
);

  localparam real TOL = 12.0;

  int unsigned v_op_mv = V_OP_MV;
  int unsigned v_out_mv = 12000;
  int v_sw1_mv, v_sw2_mv;
  logic [9:0] q;
  logic locked, samp_valid, est_timeout;
  gov_state_t state;
  logic [9:0] op;
  ton_t tpulse [2];
  ton_t ds [2];
  logic [1:0] tuned;
  zcd_t samp [2];
  logic enable;

  lockin_controller #(.INIT_TON(INIT_TON)) dut (.*);

  stc_tank_model #(.T_HALF_NS(TH1), .D_NS(DLY), .TOL_NS(TOL)) u_t1 (
    .g_chg(q[0]), .g_dis(q[1]), .invert_next(1'b0), .v_sw_mv(v_sw1_mv));
  stc_tank_model #(.T_HALF_NS(TH2), .D_NS(DLY), .TOL_NS(TOL)) u_t2 (
    .g_chg(q[2]), .g_dis(q[3]), .invert_next(1'b0), .v_sw_mv(v_sw2_mv));

  assign enable = rst_n;

  int run_locked = 0;
  always @(posedge clk) begin
    if (samp_valid && (state == GOV_LOCKIN || state == GOV_RUN)) begin
      for (int i = 0; i < 2; i++) begin
        if (samp[i] == ZCD_EARLY) n_early++;
        if (samp[i] == ZCD_LATE)  n_late++;
      end
    end
    if (samp_valid) run_locked = (state == GOV_RUN) ? run_locked + 1 : 0;
  end

  function automatic real ns_of(ton_t t); return t.coarse * 50.0 + t.fine * 0.2; endfunction

  initial begin
    int unsigned ds_exp;
    finished = 0; ok = 0; ds_ok = 0; n_early = 0; n_late = 0;
    ds_exp = $ceil(DLY / 0.2) + 5;
    wait (run_locked >= 40);
    ds_ok = 1;
    for (int i = 0; i < 2; i++)
      if (int'(ds[i].coarse) * 250 + int'(ds[i].fine) != int'(ds_exp)) ds_ok = 0;
    ok = ns_of(tpulse[0]) > TH1 - TOL && ns_of(tpulse[0]) < TH1 + TOL &&
         ns_of(tpulse[1]) > TH2 - TOL && ns_of(tpulse[1]) < TH2 + TOL && !est_timeout;
    $display("tanks %0.1f / %0.1f ns: locked at %0.1f / %0.1f ns after %0t, early=%0d late=%0d, delay %0d / %0d elements (expected %0d)",
             TH1, TH2, ns_of(tpulse[0]), ns_of(tpulse[1]), $realtime, n_early, n_late,
             int'(ds[0].coarse) * 250 + ds[0].fine, int'(ds[1].coarse) * 250 + ds[1].fine, ds_exp);
    finished = 1;
  end

endmodule
