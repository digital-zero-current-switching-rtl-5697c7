// tb_lockin_controller: end-to-end test of the lock-in controller driving a
// timing model of a 4:1 switched-tank converter with two mismatched tanks.
//
// Tank 1: L = 70 nH, C = 2.35 uF -> half period pi*sqrt(LC) = 1274.2 ns.
// Tank 2: L = 63 nH, C = 2.1 uF  -> 1142.7 ns.
// Inherent gate-to-switch delay 61.3 ns; the tanks count a turn-off within
// +/-12 ns of the current zero as ZCS.
//
// Sequence: power-up with the configuration pin at 4.85 V (OP about 528:
// continuous sampling, LPF depth 4, N_est 256, deadtime 4 clocks); delay
// estimation; lock-in of both tanks from the 1.0 us start value; a
// spurious sensor reading that the LPF must reject; a drift of tank 2 to a
// shorter period (late switching); the pin moved to 3.2 V (OP about 800:
// single-sample mode), taken over at the next re-estimation; lock again; and
// turn-off. Checked against values worked out here: the OP code (within 3 %), the
// estimated delay, the final on-times against the half periods, gate widths
// against the tuned on-times, no charge/discharge overlap, the deadtime, and
// that gates stay low after turn-off. Every mechanism is counted and must
// have happened at least once.
`timescale 1ns / 1ps
module tb_lockin_controller;
  import lockin_pkg::*;

  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;   // 20 MHz

  logic enable = 0;
  int unsigned v_op_mv = 4848;
  int unsigned v_out_mv = 12000;
  int v_sw1_mv, v_sw2_mv;
  logic [9:0] q;
  logic locked;
  gov_state_t state;
  logic [9:0] op;
  ton_t tpulse [2];
  ton_t ds [2];
  logic [1:0] tuned;
  logic samp_valid;
  zcd_t samp [2];
  logic est_timeout;
  logic inv1 = 0, inv2 = 0;

  lockin_controller dut (.*);

  localparam real TH1 = 1274.2, TH2 = 1142.7, DLY = 61.3, TOL = 12.0;

  stc_tank_model #(.T_HALF_NS(TH1), .D_NS(DLY), .TOL_NS(TOL)) u_t1 (
    .g_chg(q[0]), .g_dis(q[1]), .invert_next(inv1), .v_sw_mv(v_sw1_mv));
  stc_tank_model #(.T_HALF_NS(TH2), .D_NS(DLY), .TOL_NS(TOL)) u_t2 (
    .g_chg(q[2]), .g_dis(q[3]), .invert_next(inv2), .v_sw_mv(v_sw2_mv));

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $realtime); end
  endtask

  function automatic real ns_of(ton_t t); return t.coarse * 50.0 + t.fine * 0.2; endfunction

  // ------------------------------------------------------------ monitors
  int n_est = 0, n_early = 0, n_late = 0, n_lock = 0, n_cont = 0, n_single = 0;
  int n_updates = 0, n_cycles = 0, n_overlap = 0;
  gov_state_t prev_state = GOV_OFF;
  always @(posedge clk) begin
    if (state == GOV_EST && prev_state != GOV_EST) n_est++;
    if (state == GOV_RUN && prev_state != GOV_RUN) n_lock++;
    prev_state = state;
    if (samp_valid && (state == GOV_LOCKIN || state == GOV_RUN)) begin
      for (int i = 0; i < 2; i++) begin
        if (samp[i] == ZCD_EARLY) n_early++;
        if (samp[i] == ZCD_LATE)  n_late++;
      end
      if (dut.u_gov.samp_mode) n_single++; else n_cont++;
    end
    if (tuned != 0) n_updates++;
    if (dut.cycle_start) n_cycles++;
  end

  // gate map, widths and overlap
  always @(q) begin
    if ((q[0] || q[2]) && (q[1] || q[3])) n_overlap++;
  end
  always @(q) if (rst_n) begin
    checks++;
    if (q[4] != q[0] || q[7] != q[2] || q[8] != q[2] || q[5] != q[1] ||
        q[6] != q[1] || q[9] != q[3]) begin failures++; $display("FAIL gate map %b", q); end
  end
  realtime r1;
  realtime last_dis_fall = 0;
  always @(posedge q[0]) begin
    r1 = $realtime;
    if (last_dis_fall > 0)
      chk($realtime - last_dis_fall >= dt_prev * 50.0 - 0.01,
          $sformatf("deadtime %0t < %0d clocks", $realtime - last_dis_fall, dt_prev));
  end
  always @(negedge q[0]) if (rst_n)
    chk($realtime - r1 > ns_of(dut.u_seq.ton_act[0]) - 0.01 &&
        $realtime - r1 < ns_of(dut.u_seq.ton_act[0]) + 0.01, "tank 1 gate width");
  int dt_prev;
  always @(negedge q[1] or negedge q[3]) begin
    last_dis_fall = $realtime;
    dt_prev = int'(dut.u_seq.dt_act);   // deadtime of the cycle that is ending
  end

  initial begin
    #60000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_state(gov_state_t s, int max_clk);
    int n = 0;
    while (state != s && n < max_clk) begin @(posedge clk); n++; end
    chk(state == s, $sformatf("reached state %s", s.name()));
  endtask

  task automatic check_locked(string when);
    real t1, t2;
    t1 = ns_of(tpulse[0]);
    t2 = ns_of(tpulse[1]);
    $display("%s: on-times %0.1f ns (half period %0.1f), %0.1f ns (half period %0.1f)",
             when, t1, u_t1.t_half_ns, t2, u_t2.t_half_ns);
    chk(t1 > u_t1.t_half_ns - TOL && t1 < u_t1.t_half_ns + TOL, {when, ": tank 1 on-time"});
    chk(t2 > u_t2.t_half_ns - TOL && t2 < u_t2.t_half_ns + TOL, {when, ": tank 2 on-time"});
    chk(locked, {when, ": locked"});
  endtask

  int exp_op;
  int unsigned ds_exp;
  ton_t held;
  int rejected = 0;

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    enable = 1;
    // ---- configuration through the single pin
    wait (dut.op_valid);
    @(posedge clk);
    exp_op = int'(1024.0 * 2500.0 / v_op_mv);
    $display("OP = %0d (ideal %0d)", op, exp_op);
    chk(op > exp_op * 0.97 && op < exp_op * 1.03, "OP code");
    // ---- delay estimation
    wait_state(GOV_EST, 100);
    wait_state(GOV_LOCKIN, 400000);
    ds_exp = $ceil((DLY) / 0.2) + 5;   // first element past the delay + margin
    $display("estimated delay %0d / %0d elements (expected %0d)",
             int'(ds[0].coarse) * 250 + ds[0].fine, int'(ds[1].coarse) * 250 + ds[1].fine, ds_exp);
    for (int i = 0; i < 2; i++)
      chk(int'(ds[i].coarse) * 250 + int'(ds[i].fine) == int'(ds_exp), "estimated delay");
    chk(!est_timeout, "no estimation timeout");
    // ---- lock-in
    wait_state(GOV_RUN, 2000000);
    repeat (2000) @(posedge clk);
    if (state != GOV_RUN) wait_state(GOV_RUN, 2000000);
    check_locked("first lock");
    // ---- spurious reading: invert one turn-off of tank 2
    wait (state == GOV_RUN);
    @(posedge q[2]);
    held = tpulse[1];
    inv2 = 1;
    @(negedge q[2]);
    #100 inv2 = 0;
    repeat (3) @(posedge samp_valid);
    chk(tpulse[1] == held, "LPF rejected a single wrong reading");
    if (tpulse[1] == held) rejected++;
    // ---- drift: tank 2 gets a shorter period -> late switching
    u_t2.t_half_ns = 1100.0;
    // ---- move the pin: single-sample mode from the next estimation on
    v_op_mv = 3200;
    repeat (2) @(posedge dut.u_sdadc.op_new);
    exp_op = int'(1024.0 * 2500.0 / v_op_mv);
    $display("OP = %0d (ideal %0d)", op, exp_op);
    chk(op > exp_op * 0.97 && op < exp_op * 1.03, "OP code after pin change");
    begin
      int e0;
      e0 = n_est;
      wait (n_est > e0);
    end
    wait (state == GOV_LOCKIN || state == GOV_RUN);
    chk(dut.u_gov.samp_mode == 1'b1, "single-sample mode after re-estimation");
    wait_state(GOV_RUN, 2000000);
    repeat (20) @(posedge samp_valid);
    if (state != GOV_RUN) wait_state(GOV_RUN, 2000000);
    check_locked("after drift, single-sample mode");
    repeat (40) @(posedge samp_valid);
    // ---- turn-off: the running sequence completes, then all gates low
    @(posedge q[0]);
    enable = 0;
    @(posedge q[1]);
    chk(1'b1, "discharge phase still driven after turn-off request");
    wait_state(GOV_OFF, 1000);
    repeat (100) @(posedge clk);
    chk(q == 10'b0, "all gates low after turn-off");

    // ---- mechanism counts
    $display("cycles=%0d estimations=%0d locks=%0d early=%0d late=%0d updates=%0d continuous=%0d single=%0d rejected=%0d",
             n_cycles, n_est, n_lock, n_early, n_late, n_updates, n_cont, n_single, rejected);
    chk(n_overlap == 0, "no gate overlap");
    chk(n_est >= 2, "delay estimation at start-up and periodically");
    chk(n_lock >= 2, "lock reached");
    chk(n_early > 0, "early-switching corrections");
    chk(n_late > 0, "late-switching corrections");
    chk(n_updates > 0, "tune updates");
    chk(n_cont > 0, "continuous sampling used");
    chk(n_single > 0, "single-sample mode used");
    chk(rejected > 0, "spurious reading rejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
