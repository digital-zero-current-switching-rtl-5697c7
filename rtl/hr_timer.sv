// hr_timer: high-resolution timer unit of one gate signal.
//
// The coarse pulse, made by the sequencer's counter at clock resolution, is
// sent through a delay line whose tap is chosen by 'sel'; the gate output is
// high while either the coarse pulse or its delayed copy is high. The gate
// therefore rises with the coarse pulse and falls sel delay elements after
// it: ON-time = coarse clocks + sel x 200 ps. The split into a coarse counter
// and a delay-line fine stage is the controller's; merging the two copies
// with an OR is this design's way of extending the pulse.
`timescale 1ns / 1ps
module hr_timer #(
  parameter int unsigned SEL_W    = 8,
  parameter real         T_BUF_NS = 0.2
) (
  input  logic             coarse,
  input  logic [SEL_W-1:0] sel,
  output logic             q
);

  logic delayed;

  delay_line #(.TAPS(1 << SEL_W), .SEL_W(SEL_W), .T_BUF_NS(T_BUF_NS)) u_dl (
    .din(coarse), .sel, .dout(delayed)
  );

  assign q = coarse | delayed;

endmodule
