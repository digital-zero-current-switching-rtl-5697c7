// tb_workloads: the tank sets the controller was evaluated with, run side by
// side on three controllers:
// The inherent gate-to-switch delay is 61.3 ns, except 45.1 ns in B.
//   A  symmetric prototype tanks, 70 nH / 2.35 uF (half period 1274.2 ns)
//   B  mismatched prototype tanks, 70 nH / 2.62 uF (1345.4 ns) and
//      50 nH / 2.35 uF (1076.9 ns)
//   C  symmetric tanks started from a 1.5 us on-time, i.e. from late
//      switching, as in a late-to-ZCS transition
// Each must lock with both on-times inside the ZCS window of its tank;
// the estimated delay must be exact to the element; C must get there through late-switching corrections and A and B through
// early-switching ones.
`timescale 1ns / 1ps
module tb_workloads;
  import lockin_pkg::*;

  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;

  logic fin [3];
  logic ok [3], dsok [3];
  int   ne [3], nl [3];

  stc_bench #(.TH1(1274.2), .TH2(1274.2)) u_a (
    .clk, .rst_n, .finished(fin[0]), .ok(ok[0]), .ds_ok(dsok[0]), .n_early(ne[0]), .n_late(nl[0]));
  stc_bench #(.TH1(1345.4), .TH2(1076.9), .DLY(45.1)) u_b (
    .clk, .rst_n, .finished(fin[1]), .ok(ok[1]), .ds_ok(dsok[1]), .n_early(ne[1]), .n_late(nl[1]));
  stc_bench #(.TH1(1274.2), .TH2(1274.2), .INIT_TON(mk_ton(8'd30, 8'd0))) u_c (
    .clk, .rst_n, .finished(fin[2]), .ok(ok[2]), .ds_ok(dsok[2]), .n_early(ne[2]), .n_late(nl[2]));

  int checks = 0, failures = 0;

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2]);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (!ok[i]) begin failures++; $display("FAIL workload %0d did not lock in the ZCS window", i); end
      checks++;
      if (!dsok[i]) begin failures++; $display("FAIL workload %0d: wrong delay estimate", i); end
    end
    checks += 3;
    if (ne[0] == 0) begin failures++; $display("FAIL A: no early corrections"); end
    if (ne[1] == 0) begin failures++; $display("FAIL B: no early corrections"); end
    if (nl[2] == 0) begin failures++; $display("FAIL C: no late corrections"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
