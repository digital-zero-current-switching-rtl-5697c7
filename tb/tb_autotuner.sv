// tb_autotuner: self-checking test of the autotuner.
//
// Feeds per-tank ZCD readings once per "switching cycle" and compares the
// tuned on-times with a reference model written here (step up on early,
// down on late, update only after 'depth' identical proposals), including a
// single spurious reading that the LPF must reject, and the lock flag.
`timescale 1ns / 1ps
module tb_autotuner;
  import lockin_pkg::*;

  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;

  zcd_t samp [2];
  logic samp_valid = 0, hold = 0, load = 0;
  ton_t init_ton = mk_ton(8'd20, 8'd0);
  ton_t step = mk_ton(8'd0, 8'd25);
  logic [3:0] lpf_depth = 4'd4;
  ton_t tpulse [2];
  logic [1:0] tuned;
  logic locked;

  autotuner #(.N_TANKS(2)) dut (.*);

  int checks = 0, failures = 0;
  // reference model state
  int ref_t [2];
  int hist [2][$];
  int zrun [2];

  function automatic int to_lsb(ton_t t); return int'(t.coarse) * 250 + int'(t.fine); endfunction

  task automatic cycle(zcd_t a, zcd_t b);
    zcd_t rd [2];
    rd[0] = a; rd[1] = b;
    samp[0] = a; samp[1] = b;
    @(negedge clk) samp_valid = 1;
    @(negedge clk) samp_valid = 0;
    repeat (8) @(negedge clk);
    if (!hold) for (int i = 0; i < 2; i++) begin
      int prop;
      bit same;
      prop = ref_t[i] + (rd[i] == ZCD_EARLY ? 25 : rd[i] == ZCD_LATE ? -25 : 0);
      hist[i].push_front(prop);
      same = hist[i].size() >= int'(lpf_depth);
      for (int k = 0; k < int'(lpf_depth) && same; k++) if (hist[i][k] != prop) same = 0;
      if (same) ref_t[i] = prop;
      zrun[i] = (rd[i] == ZCD_ZCS) ? zrun[i] + 1 : 0;
    end
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (to_lsb(tpulse[i]) != ref_t[i]) begin
        failures++;
        $display("FAIL tank %0d: tpulse=%0d expected %0d", i, to_lsb(tpulse[i]), ref_t[i]);
      end
    end
    checks++;
    if (locked != (zrun[0] >= int'(lpf_depth) && zrun[1] >= int'(lpf_depth))) begin
      failures++; $display("FAIL locked=%0d", locked);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int early_updates = 0;
  always @(posedge clk) if (tuned[0]) early_updates++;

  initial begin
    samp[0] = ZCD_ZCS; samp[1] = ZCD_ZCS;
    ref_t[0] = 5000; ref_t[1] = 5000; zrun[0] = 0; zrun[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load = 1; @(negedge clk); load = 0;
    checks++;
    if (to_lsb(tpulse[0]) != 5000) begin failures++; $display("FAIL init"); end
    // tank 1 early, tank 2 late for 12 cycles
    repeat (12) cycle(ZCD_EARLY, ZCD_LATE);
    // single spurious late reading on tank 1 among early ones: rejected
    repeat (2) cycle(ZCD_EARLY, ZCD_ZCS);
    cycle(ZCD_LATE, ZCD_ZCS);
    repeat (5) cycle(ZCD_EARLY, ZCD_ZCS);
    // both ZCS: lock
    repeat (6) cycle(ZCD_ZCS, ZCD_ZCS);
    checks++; if (!locked) begin failures++; $display("FAIL not locked"); end
    // one late reading breaks the lock
    cycle(ZCD_ZCS, ZCD_LATE);
    checks++; if (locked) begin failures++; $display("FAIL still locked"); end
    // hold: readings are ignored
    hold = 1;
    repeat (5) cycle(ZCD_EARLY, ZCD_EARLY);
    hold = 0;
    // a random stretch with depth 2
    lpf_depth = 4'd2;
    repeat (30) cycle(zcd_t'($urandom_range(0, 1) ? 2'b11 : 2'b00), ZCD_EARLY);
    // expected shift: tank 1 10 cycles early -> 2 updates of 25 per 4 cycles
    checks++; if (early_updates < 3) begin failures++; $display("FAIL too few updates"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
