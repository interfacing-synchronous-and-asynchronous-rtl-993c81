// stoppable_clock: behavioural model of the basic stoppable ring oscillator.
// The ring is a delay loop and cannot be synthesizable logic; only the clock
// stop gate inside it is.
//
// The loop is: CLK -> feedback inverter -> NAND (with reset_n, forces CLK low
// during reset) -> N_INV inverters -> PRECLK -> clock stop gate and its
// staticizer -> CLK. That is 17 inversions, so with RUN held high CLK toggles
// every 17*INV_PS + STOP_PS, and the period is twice that (8.23 ns by default,
// about 120 MHz at the worst-case corner). With RUN low when PRECLK rises CLK
// stays low; it rises STOP_PS after RUN comes back. The number of inverters is
// the document's; the split of delay between the inverters and the stop gate
// is fitted to its measured cycle time and ACK-to-CLK delay.
//
// The ring is a combinational loop on purpose (lint tools report it as
// circular logic); it oscillates because every stage carries a delay.
//
// Interface: reset_n (active low, holds CLK low), run (from the ACK AND gate),
// clk (the stoppable clock), preclk (the free-running phase, for observation).
module stoppable_clock #(
  parameter int unsigned N_INV   = 15,
  parameter int unsigned INV_PS  = gsla_pkg::BASIC_INV_PS,
  parameter int unsigned STOP_PS = gsla_pkg::BASIC_STOP_PS
) (
  input  logic reset_n,
  input  logic run,
  output logic clk,
  output logic preclk
);
  timeunit 1ps; timeprecision 1ps;

  logic             clk_fb;          // output of the feedback inverter
  logic [N_INV:0]   ring;            // ring[0] is the NAND output
  logic             clk_gate;        // clock stop gate before its delay

  assign #(INV_PS) clk_fb  = ~clk;
  assign #(INV_PS) ring[0] = ~(reset_n & clk_fb);

  for (genvar i = 1; i <= N_INV; i++) begin : g_inv
    assign #(INV_PS) ring[i] = ~ring[i-1];
  end

  assign preclk = ring[N_INV];

  clock_stop_gate u_stop (
    .preclk (preclk),
    .run    (run),
    .clk    (clk_gate)
  );

  assign #(STOP_PS) clk = clk_gate;
endmodule
