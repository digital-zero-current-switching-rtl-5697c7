// delay_estimator: measures the inherent delay between a gate command and the
// actual turn-off of the power transistors, for every tank.
//
// While it runs, the governor drives both tanks with a fixed short on-time,
// so every turn-off is an early switching event and the switching node clamps
// (ZCD code 2'b11) once the transistor really turns off. The sampling block
// works in single-sample mode with the position ds[x] given here. Each
// switching cycle the position of a tank that has not yet seen 2'b11 moves
// later by EST_STEP delay elements. The first position that reads 2'b11 is
// the minimum delay with a valid reading; ds[x] is then that position plus
// the configurable 'margin'. 'done' rises when every tank has a result.
//
// The sweep, the "first valid reading" rule and the added margin follow the
// controller. The step of one delay element, the sweep limit DS_MAX (after
// which the tank reports its limit and sets 'timeout') and the SKIP readings
// ignored after 'start' (they may still belong to the on-time in use before
// the estimation) are this design's.
//
// Interface: 'start' pulse restarts the sweep at zero; samp/samp_valid from
// the sampling block; ds[] is valid for use as soon as 'done' is high and is
// held until the next 'start'.
`timescale 1ns / 1ps
module delay_estimator
  import lockin_pkg::*;
#(
  parameter int unsigned N_TANKS  = 2,
  parameter ton_t        EST_STEP = mk_ton(8'd0, 8'd1),
  parameter ton_t        DS_MAX   = mk_ton(8'd16, 8'd0),
  parameter int unsigned SKIP     = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  ton_t       margin,
  input  zcd_t       samp [N_TANKS],
  input  logic       samp_valid,
  output ton_t       ds [N_TANKS],
  output logic       done,
  output logic       timeout
);

  logic [N_TANKS-1:0] found;
  logic [3:0]         skip_cnt;
  logic               running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_TANKS; i++) ds[i] <= '0;
      found    <= '0;
      skip_cnt <= '0;
      running  <= 1'b0;
      timeout  <= 1'b0;
    end else if (start) begin
      for (int i = 0; i < N_TANKS; i++) ds[i] <= '0;
      found    <= '0;
      skip_cnt <= 4'(SKIP);
      running  <= 1'b1;
      timeout  <= 1'b0;
    end else if (running && samp_valid) begin
      if (skip_cnt != '0) skip_cnt <= skip_cnt - 1'b1;
      else begin
        for (int i = 0; i < N_TANKS; i++) begin
          if (!found[i]) begin
            if (samp[i] == ZCD_EARLY) begin
              found[i] <= 1'b1;
              ds[i]    <= ton_add(ds[i], margin);
            end else if (ds[i] >= DS_MAX) begin
              found[i] <= 1'b1;
              timeout  <= 1'b1;
            end else ds[i] <= ton_add(ds[i], EST_STEP);
          end
        end
      end
      if (&found) running <= 1'b0;
    end else if (running && &found) running <= 1'b0;
  end

  assign done = &found && !running;

endmodule
