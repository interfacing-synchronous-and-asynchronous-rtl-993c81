// gsla_pkg: shared constants of the globally-synchronous / locally-asynchronous
// pipeline interface.
//
// Delays are in picoseconds and describe the worst-case corner (90 C, 3.0 V,
// slow n and p devices) of the 0.6 um CMOS process the design was
// characterised in. They are used only by the behavioural models of the ring
// oscillator and the buffer networks; the control gates themselves are
// zero-delay logic. Gate delays are fitted so that the modelled loops
// reproduce the measured cycle times:
//   basic ring:      2*(17*INV + STOP) = 8232 ps   (measured 8.22 ns)
//   buffered ring:   2*(17*INV + STOP) = 7950 ps   (measured 7.94 ns)
//   pipelined ring:  2*(17*INV + STOP) = 7802 ps   (measured 7.79 ns)
// DATA_W, the datapath width, is this design's own choice.
package gsla_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned DATA_W = 32;

  // Basic stoppable clock (ring of NAND, 16 inverters, stop gate, staticizer)
  localparam int unsigned BASIC_INV_PS  = 198;   // fitted
  localparam int unsigned BASIC_STOP_PS = 750;   // ACK rise -> CLK rise, worst case

  // Buffered stoppable clock (buffer tree inside the ring)
  localparam int unsigned BUF_INV_PS    = 205;   // fitted
  localparam int unsigned BUF_STOP_PS   = 490;   // RUN rise -> CLK rise, worst case
  localparam int unsigned RUN_RISE_PS   = 2320;  // ACK rise -> RUN rise, worst case
  localparam int unsigned RUN_FALL_PS   = 2100;  // ACK fall -> RUN fall ("over 2 ns")

  // Pipelined interface controller
  localparam int unsigned PIPE_INV_PS      = 203;  // fitted
  localparam int unsigned PIPE_STOP_PS     = 450;  // RUN rise -> CLK rise, worst case
  localparam int unsigned PIPE_RUN_RISE_PS = 2180; // ACK rise -> RUN rise, worst case
  localparam int unsigned PIPE_RUN_FALL_PS = 2100; // ACK fall -> RUN fall ("over 2 ns")

  // Stand-alone clock network of ten inverter levels (1x ... 2048x)
  localparam int unsigned TREE_STAGES   = 10;
  localparam int unsigned TREE_RISE_PS  = 3160;  // CLKin rise -> CLK rise, worst case
  localparam int unsigned TREE_FALL_PS  = 2830;  // CLKin fall -> CLK fall, worst case

  // Inverter levels of the buffer trees inside the buffered ring (1x..128x)
  localparam int unsigned RING_TREE_STAGES = 8;
  // Inverters between the reset NAND and the clock tree in the buffered ring
  localparam int unsigned RING_PRE_INVS    = 7;
endpackage
