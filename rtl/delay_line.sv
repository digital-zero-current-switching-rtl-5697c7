// delay_line: behavioural model of the buffer-chain delay line with its tap
// multiplexer (fine-tuning stage of the high-resolution timer).
//
// Behavioural model, not synthesizable as written. On silicon this is a chain
// of TAPS standard-cell buffers, each of delay T_BUF_NS, whose taps feed a
// multiplexer; 'sel' picks the tap, so dout is din delayed by
// sel * T_BUF_NS + T_MUX_NS. The model replaces the chain by a transport delay
// of that length, which is what the chain does to a clean pulse as long as the
// pulse is longer than the delay. The 200 ps buffer delay is the built IC's
// figure; the multiplexer's own delay is not given and defaults to 0. A change
// of 'sel' while an edge is in flight in the chain is not modelled: the
// sequencer and the sampling block only change 'sel' while din is low.
//
// Interface: din (any timing), sel (tap index, 0 = no delay), dout.
`timescale 1ns / 1ps
module delay_line #(
  parameter int unsigned TAPS     = 256,
  parameter int unsigned SEL_W    = 8,
  parameter real         T_BUF_NS = 0.2,
  parameter real         T_MUX_NS = 0.0
) (
  input  logic             din,
  input  logic [SEL_W-1:0] sel,
  output logic             dout
);

  realtime dly;

  always_comb begin
    if (int'(sel) >= TAPS) dly = (TAPS - 1) * T_BUF_NS + T_MUX_NS;
    else                   dly = sel * T_BUF_NS + T_MUX_NS;
  end

  initial dout = 1'b0;

  always @(din) dout <= #(dly) din;

endmodule
