// clock_stop_gate_tb: drives PRECLK and RUN with random values and compares
// CLK with a set/reset reference (cleared by PRECLK low, set by PRECLK and
// RUN high, held otherwise), then checks the stop/restart sequence.
module clock_stop_gate_tb;
  timeunit 1ps; timeprecision 1ps;

  logic preclk, run, clk, ref_clk;
  int unsigned checks = 0, failures = 0;

  clock_stop_gate dut (.preclk, .run, .clk);

  task automatic step(input logic p, input logic r);
    preclk = p; run = r;
    #10;
    if (!p) ref_clk = 1'b0; else if (r) ref_clk = 1'b1;
    checks++;
    if (clk !== ref_clk) begin
      failures++;
      $display("%0t preclk=%b run=%b clk=%b expected %b", $time, p, r, clk, ref_clk);
    end
  endtask

  initial begin
    step(1'b0, 1'b0);
    // RUN may fall while CLK is high: CLK is held until PRECLK falls.
    step(1'b1, 1'b1); step(1'b1, 1'b0); step(1'b0, 1'b0);
    // Stopped: PRECLK high with RUN low keeps CLK low.
    step(1'b1, 1'b0); step(1'b1, 1'b0);
    // Restart as soon as RUN rises.
    step(1'b1, 1'b1);
    repeat (300) step(1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
