// tb_sampling_block: self-checking test of the sampling block.
//
// For each trial the test picks, per tank, a fine on-time part, an inherent
// delay and a clamp code (early or late), raises off_evt on a clock edge E,
// makes the sensor output switch from ZCS to the clamp code at
// E + fine x 0.2 ns + delay, and ends the window with chg_end W clocks later.
// The expected reading is computed here from those times: continuous mode
// sees the clamp if it appears before the last sample edge; single-sample
// mode sees it if the strobe at E + (fine + ds) x 0.2 ns comes after it.
`timescale 1ns / 1ps
module tb_sampling_block;
  import lockin_pkg::*;

  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;

  logic mode = 0;
  ton_t ton [2];
  ton_t ds [2];
  logic [1:0] off_evt = 0;
  logic chg_end = 0;
  logic [1:0] zcd [2];
  zcd_t samp [2];
  logic samp_valid;

  sampling_block #(.N_TANKS(2)) dut (.*);

  int checks = 0, failures = 0;
  int n_cont_hit = 0, n_single_hit = 0, n_miss = 0;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int W = 8;   // window length in clocks

  task automatic trial(bit m);
    real    clamp_t [2];
    real    strobe_t [2];
    zcd_t   code [2];
    zcd_t   expct [2];
    realtime e;
    mode = m;
    for (int g = 0; g < 2; g++) begin
      int dsl;
      ton[g]  = mk_ton(8'($urandom_range(5, 30)), 8'($urandom_range(0, 249)));
      dsl     = $urandom_range(0, 2 * 250 + 100);
      ds[g]   = mk_ton(8'(dsl / 250), 8'(dsl % 250));
      code[g] = $urandom_range(0, 1) ? ZCD_EARLY : ZCD_LATE;
      clamp_t[g] = ton[g].fine * 0.2 + 20.0 + $urandom_range(0, 3000) * 0.1 + 0.05;
      begin
        int tot;
        tot = int'(ton[g].fine) + dsl;
        strobe_t[g] = tot * 0.2;
      end
      // continuous: samples on edges E+1 .. E+W-1; chg_end is seen at E+W
      if (!m) expct[g] = (clamp_t[g] < (W - 1) * 50.0) ? code[g] : ZCD_ZCS;
      else    expct[g] = (strobe_t[g] > clamp_t[g] && strobe_t[g] < W * 50.0) ? code[g] : ZCD_ZCS;
      zcd[g] = 2'b01;
    end
    @(posedge clk);
    e = $realtime;
    off_evt <= 2'b11;
    fork
      begin #(clamp_t[0]) zcd[0] = code[0]; end
      begin #(clamp_t[1]) zcd[1] = code[1]; end
    join_none
    @(posedge clk) off_evt <= 2'b00;
    repeat (W - 2) @(posedge clk);
    chg_end <= 1'b1;
    @(posedge clk) chg_end <= 1'b0;
    #1;
    checks++;
    if (!samp_valid) begin failures++; $display("FAIL no samp_valid"); end
    for (int g = 0; g < 2; g++) begin
      checks++;
      if (samp[g] != expct[g] && !(m && strobe_t[g] > W * 50.0 - 0.1 && strobe_t[g] < W * 50.0 + 0.1)) begin
        failures++;
        $display("FAIL mode=%0d tank %0d: got %b expected %b (clamp %0f strobe %0f)",
                 m, g, samp[g], expct[g], clamp_t[g], strobe_t[g]);
      end
      if (expct[g] == ZCD_ZCS) n_miss++;
      else if (m) n_single_hit++;
      else n_cont_hit++;
    end
    disable fork;
    zcd[0] = 2'b01; zcd[1] = 2'b01;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    zcd[0] = 2'b01; zcd[1] = 2'b01;
    ton[0] = '0; ton[1] = '0; ds[0] = '0; ds[1] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (150) trial(1'b0);
    repeat (300) trial(1'b1);
    $display("continuous hits=%0d single hits=%0d ZCS=%0d", n_cont_hit, n_single_hit, n_miss);
    checks++;
    if (n_cont_hit == 0 || n_single_hit == 0 || n_miss == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
