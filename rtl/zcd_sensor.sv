// zcd_sensor: behavioural model of the two-comparator zero-current-switching
// detector on a tank's switching node.
//
// Behavioural model, not synthesizable. The switching-node voltage V_sw is
// scaled by the divider R1/R2 to V_sensed and compared with two references cut
// from V_out by the chain R_A, R_B, R_C: V_th1 = V_out (R_B+R_C)/(R_A+R_B+R_C)
// on the upper comparator (output s1) and V_th2 = V_out R_C/(R_A+R_B+R_C) on
// the lower one (output s2). The pair {s1, s2} is a small thermometer code:
//   2'b11  V_sw clamped to V_out + V_F  -> early switching
//   2'b01  V_sw inside the window       -> ZCS
//   2'b00  V_sw clamped to -V_F         -> late switching
// The divider must satisfy R_C/(R_A+R_B+R_C) < R2/(R1+R2) < (R_B+R_C)/(R_A+R_B+R_C)
// so that V_sw = V_out sits inside the window; this is checked at start.
// The resistor values are this model's assumptions (none are given): with a
// 12 V output and V_F = 0.7 V they put the window at 5.4 .. 6.24 V sensed.
`timescale 1ns / 1ps
module zcd_sensor #(
  parameter int unsigned R_A = 48,
  parameter int unsigned R_B = 7,
  parameter int unsigned R_C = 45,
  parameter int unsigned R_1 = 1,
  parameter int unsigned R_2 = 1
) (
  input  int          v_sw_mv,
  input  int unsigned v_out_mv,
  output logic [1:0]  zcd
);

  localparam longint R_SUM = longint'(R_A) + longint'(R_B) + longint'(R_C);
  localparam longint R_BC  = longint'(R_B) + longint'(R_C);
  localparam longint R_12  = longint'(R_1) + longint'(R_2);

  longint sensed, th1, th2;

  always_comb begin
    sensed = longint'(v_sw_mv) * longint'(R_2);            // x (R1+R2)
    th1    = longint'(v_out_mv) * R_BC * R_12 / R_SUM;
    th2    = longint'(v_out_mv) * longint'(R_C) * R_12 / R_SUM;
    zcd[1] = sensed > th1;
    zcd[0] = sensed > th2;
  end

  initial begin
    assert (longint'(R_C) * R_12 < longint'(R_2) * R_SUM && longint'(R_2) * R_SUM < R_BC * R_12)
      else $error("zcd_sensor: divider outside the reference window");
  end

endmodule
