// sd_adc: digital part of the single-pin configuration converter.
//
// The configuration pin voltage V_op supplies the inverter at the front of a
// first-order sigma-delta loop (see sd_frontend). This block holds the loop's
// clocked flip-flop: it samples the inverter-based comparator on every clock,
// gives the bit stream, and returns the inverted output 'trg' to the front
// inverter. A counter of ones over 2^N_BITS clocks acts as a sinc low-pass
// filter and is reset at the end of every interval (decimation), so the mean
// of the comparator node obeys V_ref = V_op * CNTR / 2^N_BITS and the count is
// the N_BITS-bit configuration word OP. With N_BITS = 10, OP is refreshed
// every 1024 clocks, as in the built IC. A full count of 2^N_BITS ones
// saturates to all ones (this design's choice).
//
// Timing: op/op_valid change in the clock after the last clock of an
// interval; op_valid stays high once the first interval is complete.
`timescale 1ns / 1ps
module sd_adc #(
  parameter int unsigned N_BITS = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmp_in,     // inverter-comparator output
  output logic              bitstream,
  output logic              trg,        // inverted bit, drives the front end
  output logic [N_BITS-1:0] op,
  output logic              op_valid,
  output logic              op_new      // pulse: op refreshed
);

  logic [N_BITS-1:0] tick;     // position inside the decimation interval
  logic [N_BITS:0]   ones;     // CNTR_n

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bitstream <= 1'b0;
    else        bitstream <= cmp_in;
  end

  assign trg = ~bitstream;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick     <= '0;
      ones     <= '0;
      op       <= '0;
      op_valid <= 1'b0;
      op_new   <= 1'b0;
    end else begin
      tick   <= tick + 1'b1;
      op_new <= 1'b0;
      if (tick == '1) begin
        // last clock of the interval: include this bit and dump
        if (ones + (N_BITS+1)'(bitstream) > (N_BITS+1)'({N_BITS{1'b1}}))
          op <= '1;
        else
          op <= N_BITS'(ones + (N_BITS+1)'(bitstream));
        ones     <= '0;
        op_valid <= 1'b1;
        op_new   <= 1'b1;
      end else begin
        ones <= ones + (N_BITS+1)'(bitstream);
      end
    end
  end

endmodule
