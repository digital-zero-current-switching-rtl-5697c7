// tb_zcd_sensor: self-checking test of the two-comparator ZCD model.
//
// Sweeps the switching-node voltage for a few output voltages and compares
// the 2-bit code with thresholds worked out here from the divider values
// (window of 0.90 .. 1.04 x V_out on the node), and checks the three clamp
// cases of a 12 V converter: V_out + 0.7 V -> 2'b11, V_out -> 2'b01,
// -0.7 V -> 2'b00.
`timescale 1ns / 1ps
module tb_zcd_sensor;
  int v_sw_mv = 0;
  int unsigned v_out_mv = 12000;
  logic [1:0] zcd;

  zcd_sensor dut (.v_sw_mv, .v_out_mv, .zcd);

  int checks = 0, failures = 0;

  task automatic expect_code(logic [1:0] e, string what);
    #1;
    checks++;
    if (zcd !== e) begin
      failures++;
      $display("FAIL %s: v_sw=%0d v_out=%0d code=%b expected %b", what, v_sw_mv, v_out_mv, zcd, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v_out_mv = 12000;
    v_sw_mv = 12700; expect_code(2'b11, "early clamp");
    v_sw_mv = 12000; expect_code(2'b01, "ZCS");
    v_sw_mv = -700;  expect_code(2'b00, "late clamp");
    for (int k = 0; k < 300; k++) begin
      real hi, lo;
      v_out_mv = $urandom_range(6000, 14000);
      v_sw_mv  = int'($urandom_range(0, 16000)) - 1000;
      hi = v_out_mv * 1.04;
      lo = v_out_mv * 0.90;
      if (v_sw_mv > hi + 1.0)      expect_code(2'b11, "sweep high");
      else if (v_sw_mv > lo + 1.0 && v_sw_mv < hi - 1.0) expect_code(2'b01, "sweep window");
      else if (v_sw_mv < lo - 1.0) expect_code(2'b00, "sweep low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
