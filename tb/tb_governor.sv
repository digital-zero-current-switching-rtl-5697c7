// tb_governor: self-checking test of the system governor.
//
// Walks the governor through start-up (waiting for OP), delay estimation,
// lock-in, locked running, a loss of lock, the periodic re-estimation after
// N_est switching cycles (counted here, for both N_est settings), a configuration change picked up at
// re-estimation, and turn-off, which must wait for the sequencer to go idle.
// The decoded deadtime, N_est, LPF depth, sampling mode and margin are
// compared with the OP layout worked out here.
`timescale 1ns / 1ps
module tb_governor;
  import lockin_pkg::*;

  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;

  logic enable = 0, op_valid = 0, locked = 0, est_done = 0, cycle_start = 0, seq_busy = 0;
  logic [9:0] op = '0;
  gov_state_t state;
  logic seq_run, force_est_ton, tuner_hold, tuner_load, est_start, samp_mode;
  ton_t est_ton, init_ton, step, est_margin;
  logic [3:0] dt_cycles, lpf_depth;

  governor dut (.*);

  int checks = 0, failures = 0;
  int est_starts = 0;
  always @(posedge clk) if (est_start) begin est_starts++; est_done <= 0; end  // estimator restarts

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state %s) at %0t", msg, state.name(), $realtime); end
  endtask

  task automatic cycles(int n);
    repeat (n) begin
      @(negedge clk) cycle_start = 1;
      @(negedge clk) cycle_start = 0;
      repeat (2) @(negedge clk);
    end
  endtask

  task automatic check_cfg(logic [9:0] o);
    chk(dt_cycles == (o[5] ? 4'd2 : 4'd4), "deadtime decode");
    chk(lpf_depth == (o[7] ? 4'd8 : 4'd4), "LPF depth decode");
    chk(est_margin == mk_ton(8'd0, 8'd5), "margin");
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] cfg1, cfg2;
    int n_est, n;
    cfg1 = 10'b10_0000_1011;   // continuous, depth 4, N_est 256, dt 4
    cfg2 = 10'b11_1111_0100;   // single, depth 8, N_est 4096, dt 2
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(state == GOV_OFF && !seq_run && tuner_load, "reset state");
    enable = 1;
    repeat (5) @(negedge clk);
    chk(state == GOV_WAIT_CFG && !seq_run, "waits for OP");
    op = cfg1; op_valid = 1;
    repeat (2) @(negedge clk);
    chk(state == GOV_EST && seq_run && force_est_ton && tuner_hold && samp_mode, "estimation mode");
    chk(est_starts == 1, "estimation started once");
    check_cfg(cfg1);
    cycles(5);
    chk(state == GOV_EST, "stays in estimation until done");
    est_done = 1;
    repeat (2) @(negedge clk);
    chk(state == GOV_LOCKIN && !force_est_ton && !tuner_hold && step == mk_ton(8'd0, 8'd25)
        && samp_mode == cfg1[8], "lock-in mode");
    cycles(3);
    locked = 1;
    repeat (2) @(negedge clk);
    chk(state == GOV_RUN && step == mk_ton(8'd0, 8'd1), "run mode with fine step");
    locked = 0;
    repeat (2) @(negedge clk);
    chk(state == GOV_LOCKIN, "lock lost -> lock-in");
    locked = 1;
    // count cycles to the re-estimation: N_est = 256 from the start of lock-in
    n_est = cfg1[6] ? 4096 : 256;
    op = cfg2;
    n = 3;
    while (state != GOV_EST && n < 1000) begin cycles(1); n++; end
    chk(n == n_est, $sformatf("re-estimation after %0d cycles, expected %0d", n, n_est));
    chk(est_starts == 2, "second estimation start");
    check_cfg(cfg2);
    est_done = 0; repeat (2) @(negedge clk); est_done = 1;
    repeat (2) @(negedge clk);
    chk(state == GOV_RUN && samp_mode == 1'b1, "new sampling mode after re-estimation");
    // the second configuration asks for N_est = 4096
    n_est = cfg2[6] ? 4096 : 256;
    n = 0;
    while (state != GOV_EST && n < 5000) begin cycles(1); n++; end
    chk(n == n_est, $sformatf("second re-estimation after %0d cycles, expected %0d", n, n_est));
    chk(est_starts == 3, "third estimation start");
    chk(force_est_ton && tuner_hold && samp_mode, "estimation mode again");
    check_cfg(cfg2);
    est_done = 1;
    repeat (2) @(negedge clk);
    chk(state == GOV_RUN, "back to run after re-estimation while locked");
    // turn-off: the sequencer is busy for a while
    seq_busy = 1;
    enable = 0;
    repeat (2) @(negedge clk);
    chk(state == GOV_STOP && !seq_run, "stop requested");
    repeat (10) @(negedge clk);
    chk(state == GOV_STOP, "waits for sequence completion");
    seq_busy = 0;
    repeat (2) @(negedge clk);
    chk(state == GOV_OFF && tuner_load, "off after completion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
