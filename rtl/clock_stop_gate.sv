// clock_stop_gate: the state-holding gate that starts and stops the ring
// oscillator clock.
//
// CLK is set when both PRECLK and RUN are high and is cleared as soon as
// PRECLK is low; in every other case it keeps its value (a weak keeper holds
// it in the transistor circuit). Because CLK is held once it has risen, RUN
// may fall at any time after CLK has gone high, up to just before the next
// rising edge. The clock is thus stopped synchronously (by RUN being low when
// PRECLK next rises) and restarted asynchronously (CLK rises as soon as RUN
// rises while PRECLK is high).
//
// Interface: preclk (ring oscillator phase), run (all asynchronous modules
// done), clk (stoppable clock). The function follows the document; it is
// written here as a zero-delay set/reset latch, so its state is a latch by
// intent. The gate's delay is modelled by the ring oscillator that uses it.
module clock_stop_gate (
  input  logic preclk,
  input  logic run,
  output logic clk
);
  timeunit 1ps; timeprecision 1ps;

  // Set/reset latch: reset (PRECLK low) dominates, set needs PRECLK and RUN.
  always_latch begin
    if (!preclk)   clk = 1'b0;
    else if (run)  clk = 1'b1;
  end
endmodule
