// tb_sequencer: self-checking test of the sequencer.
//
// Measures every gate pulse with simulation time and compares it with the
// expected on-time (coarse clocks x 50 ns + fine x 200 ps), checks the phase
// length (longest tank + 1 guard clock + deadtime), the deadtime between the
// end of one phase and the start of the next, that charge and discharge gates
// never overlap, that new on-times are taken only at a cycle start, and that
// dropping 'run' lets the sequence complete.
`timescale 1ns / 1ps
module tb_sequencer;
  import lockin_pkg::*;

  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;

  logic run = 0;
  ton_t ton [2];
  logic [3:0] dt_cycles = 4'd3;
  ton_t ton_act [2];
  logic [1:0] gate_chg, gate_dis, off_evt;
  logic chg_end, cycle_start, phase_dis, busy;

  sequencer #(.N_TANKS(2)) dut (.*);

  int checks = 0, failures = 0;
  realtime rise_c [2], rise_d [2];
  realtime exp_c  [2];
  realtime last_fall, phase_start;
  int cycles = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $realtime); end
  endtask

  function automatic realtime ns_of(ton_t t);
    return t.coarse * 50.0 + t.fine * 0.2;
  endfunction

  // pulse widths
  for (genvar g = 0; g < 2; g++) begin : g_mon
    always @(posedge gate_chg[g]) rise_c[g] = $realtime;
    always @(negedge gate_chg[g]) if (rst_n) begin
      chk(($realtime - rise_c[g]) > ns_of(ton_act[g]) - 0.01 &&
          ($realtime - rise_c[g]) < ns_of(ton_act[g]) + 0.01,
          $sformatf("charge width tank %0d: %0t vs %0t", g, $realtime - rise_c[g], ns_of(ton_act[g])));
      last_fall = $realtime;
    end
    always @(posedge gate_dis[g]) rise_d[g] = $realtime;
    always @(negedge gate_dis[g]) if (rst_n) begin
      chk(($realtime - rise_d[g]) > ns_of(ton_act[g]) - 0.01 &&
          ($realtime - rise_d[g]) < ns_of(ton_act[g]) + 0.01,
          $sformatf("discharge width tank %0d", g));
      last_fall = $realtime;
    end
  end

  // overlap and deadtime
  always @(gate_chg or gate_dis) chk(!(|gate_chg && |gate_dis), "overlap");

  // phase length: time between consecutive phase starts
  realtime prev_start = -1;
  int unsigned exp_len;
  always @(posedge clk) begin
    if (busy && dut.cnt == 0) begin
      int cm;
      cm = (ton_act[0].coarse > ton_act[1].coarse) ? ton_act[0].coarse : ton_act[1].coarse;
      if (prev_start >= 0) chk(($realtime - prev_start) > exp_len * 50.0 - 0.01 &&
                               ($realtime - prev_start) < exp_len * 50.0 + 0.01, "phase length");
      exp_len = cm + 1 + dt_cycles;
      prev_start = $realtime;
    end else if (!busy) prev_start = -1;
  end

  always @(posedge gate_chg[0] or posedge gate_dis[0]) begin
    if (last_fall > 0) chk($realtime - last_fall >= dt_cycles * 50.0 - 0.01, "deadtime");
  end

  // off_evt rises on the clock edge where the coarse pulse ends
  int offs = 0;
  always @(posedge clk) if (off_evt[0]) offs++;
  always @(posedge clk) if (cycle_start) cycles++;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ton[0] = mk_ton(8'd20, 8'd137);
    ton[1] = mk_ton(8'd18, 8'd3);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run = 1;
    wait (cycles == 2);
    // change the request mid-cycle: must only appear at the next start
    @(negedge clk);
    ton[0] = mk_ton(8'd15, 8'd249);
    ton[1] = mk_ton(8'd25, 8'd0);
    @(negedge clk);
    chk(ton_act[0] == mk_ton(8'd20, 8'd137), "tune register changed mid-cycle");
    wait (cycles == 3);
    @(negedge clk);
    chk(ton_act[0] == mk_ton(8'd15, 8'd249) && ton_act[1] == mk_ton(8'd25, 8'd0),
        "tune register not loaded at cycle start");
    wait (cycles == 6);
    // random on-times
    repeat (10) begin
      @(posedge cycle_start);
      ton[0] = mk_ton(8'($urandom_range(2, 40)), 8'($urandom_range(0, 249)));
      ton[1] = mk_ton(8'($urandom_range(2, 40)), 8'($urandom_range(0, 249)));
    end
    // stop mid-charge: the discharge phase must still run
    @(posedge cycle_start);
    repeat (3) @(negedge clk);
    run = 0;
    begin
      int dis_seen = 0;
      while (busy) begin
        @(negedge clk);
        if (gate_dis[0]) dis_seen = 1;
      end
      chk(dis_seen == 1, "sequence not completed after stop");
    end
    repeat (20) @(negedge clk);
    chk(gate_chg == 0 && gate_dis == 0 && !busy, "gates off after stop");
    // restart with a shorter deadtime
    dt_cycles = 4'd1;
    run = 1;
    repeat (5) begin
      @(posedge cycle_start);
      ton[0] = mk_ton(8'($urandom_range(2, 40)), 8'($urandom_range(0, 249)));
    end
    run = 0;
    wait (!busy);
    chk(offs >= cycles - 1, "off events");
    $display("cycles=%0d off_evt=%0d", cycles, offs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
