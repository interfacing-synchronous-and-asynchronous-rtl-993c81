// buffer_tree: behavioural model of a clock (or RUN) buffer network.
// It is not synthesizable logic: it stands for a tree of large inverters with
// shorting bars between the outputs of each level, which behaves like one
// chain of inverters whose delay differs for rising and falling outputs.
//
// out follows in (inverted when STAGES is odd) after RISE_PS for a rising
// output and FALL_PS for a falling one. The delay is a transport delay: a
// pulse shorter than the delay still comes out, as it does from a real
// inverter chain whose levels each switch much faster than the whole chain.
// The defaults are the ten-level
// network of the document (1x,1x,2x,4x,8x,32x,32x,128x,512x,2048x) with its
// worst-case delays. The network is short enough that only one clock pulse is
// in it at a time (3.16 ns against an 8.33 ns period).
module buffer_tree #(
  parameter int unsigned STAGES  = gsla_pkg::TREE_STAGES,
  parameter int unsigned RISE_PS = gsla_pkg::TREE_RISE_PS,
  parameter int unsigned FALL_PS = gsla_pkg::TREE_FALL_PS
) (
  input  logic in,
  output logic out
);
  timeunit 1ps; timeprecision 1ps;

  localparam bit INVERT = STAGES[0];

  logic x;
  assign x = in ^ INVERT;

  initial out = x;
  always @(posedge x) out <= #(RISE_PS) 1'b1;
  always @(negedge x) out <= #(FALL_PS) 1'b0;
endmodule
