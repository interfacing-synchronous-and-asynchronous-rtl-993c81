// pipelined_interface_tb: runs the pipelined interface controller with one
// domino datapath module at the worst-case corner delays. Checks every value
// through the ACK register and the two CLK registers, and the time of every
// clock edge (7.80 ns free-running; ACK rise + 2.18 ns RUN tree + 0.45 ns
// when the module is late). Stalled and free-running cycles must both occur.
// The first edge after reset must fall between the end of the module's
// precharge and the fall of RUN; the handshake controller's assertion stops
// the simulation if it comes before, and the watchdog fires if it comes after.
module pipelined_interface_tb;
  timeunit 1ps; timeprecision 1ps;

  logic        done, started;
  int unsigned ck, fl, st, fr;
  int unsigned checks, failures;

  pipelined_bench #(.N_ASYNC(1), .NAND_POS(8), .SPREAD(15)) u_main (
    .done, .started, .checks (ck), .failures (fl), .stalls (st), .free_cycles (fr)
  );

  initial begin
    wait (done);
    checks   = ck + 2;
    failures = fl;
    if (st == 0) begin failures++; $display("no stalled cycle"); end
    if (fr == 0) begin failures++; $display("no free-running cycle"); end
    $display("stalls=%0d free=%0d", st, fr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", ck, fl + 1);
    $finish;
  end
endmodule
