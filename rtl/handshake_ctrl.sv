// handshake_ctrl: basic handshake control circuit, one per asynchronous module.
//
// It turns the stoppable clock into a four-phase REQ/ACK handshake with a
// precharged (domino) asynchronous datapath:
//   * REQ is held high until CLK rises, so the module's outputs stay valid
//     while the next pipeline register latches them;
//   * once CLK is high and ACK is high, REQ falls and the module precharges;
//   * when the module signals end of precharge by lowering ACK, REQ rises at
//     once and computation starts, wherever in the cycle that happens;
//   * the module raises ACK when its results are valid. ACK also goes to the
//     AND gate that forms RUN, so a late ACK stretches the clock.
// reset_n low forces REQ high (the module then raises ACK during reset).
//
// The circuit is a state-holding node with a pull-up on ACK low (and on
// reset) and a pull-down on ACK high and CLK high, written here as a
// zero-delay set/reset latch; this follows the document. The timing rule that
// computation must not complete while CLK is still high (else precharge would
// be re-entered) is checked by an assertion.
module handshake_ctrl (
  input  logic reset_n,   // active-low reset
  input  logic clk,       // stoppable clock
  input  logic ack,       // acknowledge from the asynchronous module
  output logic req,       // request to the asynchronous module
  output logic ack_run    // ACK forwarded to the RUN AND gate
);
  timeunit 1ps; timeprecision 1ps;

  always_latch begin
    if (!reset_n || !ack) req = 1'b1;   // pull-up: reset or precharge done
    else if (clk)         req = 1'b0;   // pull-down: ACK high and CLK high
  end

  assign ack_run = ack;

  // Timing assumption of the basic controller: CLK falls before the
  // asynchronous module completes precharge and computation.
  always @(posedge ack) begin
    if (reset_n) assert (!clk)
      else $error("handshake_ctrl: ACK rose while CLK was still high");
  end
endmodule
