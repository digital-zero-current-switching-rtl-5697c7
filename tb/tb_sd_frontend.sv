// tb_sd_frontend: self-checking test of the sigma-delta front-end model.
//
// Closes the loop with a clocked flip-flop (20 MHz) and counts the ones over
// 1024 clocks for pin voltages from 2.6 V to 5.0 V in 100 mV steps, then a
// few out of order. The count must match 1024 x V_th / V_op (the modulator's
// balance equation) within 3 % (the RC node is a leaky integrator, so the
// balance is not exact), and must not rise when the pin voltage rises.
`timescale 1ns / 1ps
module tb_sd_frontend;
  logic clk = 0;
  always #25 clk = ~clk;

  int unsigned v_op_mv = 5000;
  logic q = 0;
  logic trg, cmp_out;

  assign trg = ~q;

  sd_frontend dut (.v_op_mv, .trg, .cmp_out);

  always @(posedge clk) q <= cmp_out;

  int checks = 0, failures = 0;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vs [$];
    int prev_cnt;
    prev_cnt = 1 << 30;
    for (int v = 2600; v <= 5000; v += 100) vs.push_back(v);
    vs.push_back(4700); vs.push_back(3300); vs.push_back(2800);
    foreach (vs[i]) begin
      int cnt;
      real expct;
      cnt = 0;
      v_op_mv = vs[i];
      repeat (400) @(posedge clk);       // settle
      repeat (1024) @(posedge clk) cnt += int'(q);
      expct = 1024.0 * 2500.0 / vs[i];
      checks++;
      if (cnt < expct * 0.97 || cnt > expct * 1.03) begin
        failures++;
        $display("FAIL V_op=%0d mV: %0d ones, expected %0f", vs[i], cnt, expct);
      end else $display("V_op=%0d mV: %0d ones (ideal %0f)", vs[i], cnt, expct);
      if (i > 0 && i <= 24) begin          // rising sweep
        checks++;
        if (cnt > prev_cnt) begin
          failures++;
          $display("FAIL count rose from %0d to %0d at V_op=%0d mV", prev_cnt, cnt, vs[i]);
        end
      end
      prev_cnt = cnt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
