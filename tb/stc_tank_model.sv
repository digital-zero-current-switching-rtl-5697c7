// stc_tank_model: timing-level model of one resonant tank of a switched-tank
// converter, as seen by its switching-node ZCD sensor.
//
// The tank's half resonant period is t_half_ns. A charge pulse on g_chg that
// is shorter than t_half_ns - tol_ns is early switching: once the transistor
// really turns off, d_ns after the gate falls, the switching node clamps to
// V_out + V_F. A pulse longer than t_half_ns + tol_ns is late switching and
// the node clamps to -V_F. Otherwise the current is zero at turn-off and the
// node stays at V_out. The next discharge turn-on (again d_ns later) releases
// the node. t_half_ns and d_ns are variables so a test can make the
// components drift; 'invert_next' makes the next turn-off report the wrong
// polarity once (a spurious sensor event).
`timescale 1ns / 1ps
module stc_tank_model #(
  parameter real T_HALF_NS = 1274.0,
  parameter real D_NS      = 100.0,
  parameter real TOL_NS    = 12.0,
  parameter int  V_OUT_MV  = 12000,
  parameter int  V_F_MV    = 700
) (
  input  logic g_chg,
  input  logic g_dis,
  input  logic invert_next,
  output int   v_sw_mv
);

  real     t_half_ns = T_HALF_NS;
  real     d_ns      = D_NS;
  realtime t_on;
  real     width;
  int      early_cnt = 0, late_cnt = 0, zcs_cnt = 0;

  initial v_sw_mv = V_OUT_MV;

  always @(posedge g_chg) t_on = $realtime;

  always @(negedge g_chg) begin
    int v;
    width = $realtime - t_on;
    if (width < t_half_ns - TOL_NS)      begin v = V_OUT_MV + V_F_MV; early_cnt++; end
    else if (width > t_half_ns + TOL_NS) begin v = -V_F_MV;           late_cnt++;  end
    else                                 begin v = V_OUT_MV;          zcs_cnt++;   end
    if (invert_next) v = (v == -V_F_MV) ? V_OUT_MV + V_F_MV : -V_F_MV;
    #(d_ns);
    v_sw_mv = v;
  end

  always @(posedge g_dis) begin
    #(d_ns);
    v_sw_mv = V_OUT_MV;
  end

endmodule
