// handshake_ctrl_pipelined: handshake control circuit of the pipelined
// interface controller, one per asynchronous module.
//
// The asynchronous module is followed by an extra register clocked by the
// rising edge of ACK, so its results are saved the moment they are ready and
// precharge can overlap with the slow rise of RUN through its buffer tree.
// The protocol is therefore shifted by half a handshake compared with the
// basic controller:
//   * CLK rising sets REQ high: computation starts with every clock edge;
//   * ACK rising (results latched into the ACK register) with CLK low sets
//     REQ low: the module precharges, and lowers ACK when done;
//   * ACK must fall again before the next rising edge of CLK.
// A series device gated by CLK low keeps the pull-up off while CLK is high, so
// REQ is never driven both ways; this lets ACK rise before CLK has fallen.
// reset_n low forces REQ high.
//
// Outputs: req; ack_reg, the buffered ACK that clocks the register after the
// module; ack_run, ACK forwarded to the RUN AND gate. The function follows the
// document's circuit; it is written as a zero-delay set/reset latch, and the
// two ACK buffers are plain wires here.
module handshake_ctrl_pipelined (
  input  logic reset_n,   // active-low reset
  input  logic clk,       // stoppable clock
  input  logic ack,       // acknowledge from the asynchronous module
  output logic req,       // request to the asynchronous module
  output logic ack_reg,   // clock of the register after the module
  output logic ack_run    // ACK forwarded to the RUN AND gate
);
  timeunit 1ps; timeprecision 1ps;

  always_latch begin
    if (!reset_n || clk)  req = 1'b1;   // pull-down of the inner node: CLK or reset
    else if (ack)         req = 1'b0;   // pull-up path: ACK high, not reset, CLK low
  end

  assign ack_reg = ack;
  assign ack_run = ack;

  // Rule of the pipelined protocol: precharge (ACK low) has ended before the
  // next computation is started by CLK rising.
  always @(posedge clk) begin
    if (reset_n) assert (!ack)
      else $error("handshake_ctrl_pipelined: CLK rose before ACK fell");
  end
endmodule
