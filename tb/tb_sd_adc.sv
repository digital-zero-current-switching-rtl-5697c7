// tb_sd_adc: self-checking test of the single-pin converter's digital part.
//
// Drives the comparator input with random bit streams of several densities,
// counts the ones of every 1024-clock interval independently (one bit per
// clock, in the order the flip-flop takes them) and compares the count with
// the OP word. Also checks the 1024-clock refresh rate, the saturation of a
// full count, and that trg is the inverted bit.
`timescale 1ns / 1ps
module tb_sd_adc;
  logic clk = 0, rst_n = 0;
  always #25 clk = ~clk;

  logic cmp_in = 0;
  logic bitstream, trg, op_valid, op_new;
  logic [9:0] op;

  sd_adc #(.N_BITS(10)) dut (.*);

  int checks = 0, failures = 0;
  int density = 512;     // ones per 1024, for the stimulus
  int edge_n = 0, ones = 0, exp_op = -1, last_new = -1;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) cmp_in <= ($urandom_range(0, 1023) < density);

  always @(posedge clk) if (rst_n) begin
    if (op_new) begin
      checks++;
      if (exp_op < 0 || int'(op) != exp_op) begin
        failures++; $display("FAIL op=%0d expected %0d", op, exp_op);
      end
      if (last_new >= 0) begin
        checks++;
        if (edge_n - last_new != 1024) begin failures++; $display("FAIL rate %0d", edge_n - last_new); end
      end
      last_new = edge_n;
    end
    checks++;
    if (trg != ~bitstream) failures++;
    // reference count of the bit held before this edge
    ones += int'(bitstream);
    if (edge_n % 1024 == 1023) begin
      exp_op = (ones > 1023) ? 1023 : ones;
      ones = 0;
    end
    edge_n++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++;
    if (op_valid) begin failures++; $display("FAIL op_valid early"); end
    density = 300;  repeat (2 * 1024) @(negedge clk);
    density = 900;  repeat (2 * 1024) @(negedge clk);
    density = 1024; repeat (2 * 1024) @(negedge clk);
    density = 0;    repeat (2 * 1024) @(negedge clk);
    checks++;
    if (!op_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
