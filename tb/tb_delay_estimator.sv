// tb_delay_estimator: self-checking test of the inherent-delay estimation.
//
// A sensor model answers each switching cycle with 2'b11 when the sampling
// position ds[x] presented by the estimator is at or beyond the tank's true
// delay, and 2'b01 otherwise. The final ds[x] must equal the true delay
// (rounded up to a delay element) plus the margin, the number of cycles must
// be SKIP + delay + 1, the first SKIP readings must be ignored even if they
// say early, and a delay beyond the sweep limit must end in 'timeout'.
`timescale 1ns / 1ps
module tb_delay_estimator;
  import lockin_pkg::*;

  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;

  logic start = 0;
  ton_t margin;
  zcd_t samp [2];
  logic samp_valid = 0;
  ton_t ds [2];
  logic done, timeout;

  delay_estimator #(.N_TANKS(2), .DS_MAX(mk_ton(8'd4, 8'd0))) dut (.*);

  int checks = 0, failures = 0;

  function automatic int lsb(ton_t t); return int'(t.coarse) * 250 + int'(t.fine); endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_est(int d0, int d1, int m);
    int cyc = 0;
    int exp_cyc;
    margin = mk_ton(8'(m / 250), 8'(m % 250));
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!done && cyc < 5000) begin
      // readings for this cycle (first two say "early" to test the skip)
      samp[0] = (cyc < 2 || lsb(ds[0]) >= d0) ? ZCD_EARLY : ZCD_ZCS;
      samp[1] = (cyc < 2 || lsb(ds[1]) >= d1) ? ZCD_EARLY : ZCD_ZCS;
      @(negedge clk) samp_valid = 1;
      @(negedge clk) samp_valid = 0;
      repeat (3) @(negedge clk);
      cyc++;
    end
    exp_cyc = 2 + ((d0 > d1) ? d0 : d1) + 1;
    if (d0 <= 1000 && d1 <= 1000) begin
      checks += 4;
      if (lsb(ds[0]) != d0 + m) begin failures++; $display("FAIL ds0=%0d exp %0d", lsb(ds[0]), d0 + m); end
      if (lsb(ds[1]) != d1 + m) begin failures++; $display("FAIL ds1=%0d exp %0d", lsb(ds[1]), d1 + m); end
      if (cyc != exp_cyc) begin failures++; $display("FAIL cycles %0d exp %0d", cyc, exp_cyc); end
      if (timeout) begin failures++; $display("FAIL timeout"); end
    end else begin
      checks++;
      if (!timeout || !done) begin failures++; $display("FAIL no timeout"); end
    end
  endtask

  initial begin
    samp[0] = ZCD_ZCS; samp[1] = ZCD_ZCS;
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++;
    if (done) begin failures++; $display("FAIL done after reset"); end
    run_est(500, 437, 5);
    run_est(0, 3, 10);
    for (int i = 0; i < 6; i++) run_est($urandom_range(0, 900), $urandom_range(0, 900), $urandom_range(0, 20));
    run_est(1200, 10, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
