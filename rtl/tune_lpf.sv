// tune_lpf: majority-free "all equal" low-pass filter of one tank's on-time
// (part of the autotuner).
//
// A shift register of DEPTH_MAX words takes one compensator proposal per
// switching cycle. The tune register (tpulse) is loaded with the newest
// proposal only when the newest 'depth' words are all equal, so a single odd
// ZCD reading can never move the on-time: 'depth' consecutive identical
// proposals are needed. The register chain and the comparison block follow
// the controller; the run-time depth selection (1..DEPTH_MAX) is how this
// design makes the number of compared registers configurable.
//
// Timing: a proposal on t_valid shifts in on that clock; tpulse changes on
// the following clock. 'load' (synchronous) sets tpulse to init_t and marks
// the register chain empty.
`timescale 1ns / 1ps
module tune_lpf
  import lockin_pkg::*;
#(
  parameter int unsigned DEPTH_MAX = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  ton_t init_t,
  input  ton_t t_x,
  input  logic t_valid,
  input  logic [3:0] depth,   // 1 .. DEPTH_MAX registers compared
  output ton_t tpulse,
  output logic updated        // pulse: tpulse was (re)loaded from the chain
);

  ton_t                 regs [DEPTH_MAX];
  logic [DEPTH_MAX-1:0] full;   // register i holds a proposal
  logic                 agree;

  // Comparison block: the newest 'depth' registers hold one value.
  always_comb begin
    agree = (depth != 4'd0);
    for (int i = 0; i < DEPTH_MAX; i++) begin
      if (i < int'(depth)) begin
        if (!full[i] || regs[i] != regs[0]) agree = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH_MAX; i++) regs[i] <= '0;
      full    <= '0;
      tpulse  <= '0;
      updated <= 1'b0;
    end else if (load) begin
      full    <= '0;
      tpulse  <= init_t;
      updated <= 1'b0;
    end else begin
      updated <= 1'b0;
      if (t_valid) begin
        regs[0] <= t_x;
        for (int i = 1; i < DEPTH_MAX; i++) regs[i] <= regs[i-1];
        full <= {full[DEPTH_MAX-2:0], 1'b1};
      end else if (agree && regs[0] != tpulse) begin
        tpulse  <= regs[0];
        updated <= 1'b1;
      end
    end
  end

endmodule
