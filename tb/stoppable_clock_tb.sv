// stoppable_clock_tb: checks the basic stoppable ring oscillator.
//   * reset holds CLK low;
//   * the first edge comes 16 gate delays plus the stop gate delay after
//     reset is released (3.918 ns with the defaults);
//   * free-running period 2*(17*198 + 750) = 8.232 ns, 50% duty cycle;
//   * RUN lowered while CLK is high stops the clock at its next rising edge,
//     and CLK rises 750 ps after RUN is raised again;
//   * RUN pulsed low while CLK is low and restored before PRECLK rises
//     leaves the period unchanged.
module stoppable_clock_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned INV = gsla_pkg::BASIC_INV_PS;
  localparam int unsigned STP = gsla_pkg::BASIC_STOP_PS;
  localparam int unsigned T   = 2 * (17 * INV + STP);

  logic reset_n, run, clk, preclk;
  int unsigned checks = 0, failures = 0, rises = 0;
  time t0;

  stoppable_clock dut (.reset_n, .run, .clk, .preclk);

  always @(posedge clk) rises++;

  task automatic expect_eq(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin failures++; $display("%0t %s: %0d expected %0d", $time, what, got, want); end
  endtask

  initial begin
    reset_n = 1'b0; run = 1'b1;
    #20ns;
    expect_eq("CLK low in reset", clk, 0);
    rises = 0; #20ns;
    expect_eq("no edge in reset", rises, 0);
    reset_n = 1'b1; t0 = $time;
    @(posedge clk);
    expect_eq("first edge after reset", $time - t0, 16 * INV + STP);
    t0 = $time;
    repeat (5) begin
      @(posedge clk);
      expect_eq("period", $time - t0, T);
      t0 = $time;
      @(negedge clk);
      expect_eq("high time", $time - t0, T / 2);
    end
    // Stop the clock: lower RUN while CLK is high.
    @(posedge clk); #1ns; run = 1'b0;
    rises = 0; #30ns;
    expect_eq("stopped: no edge", rises, 0);
    expect_eq("stopped: CLK low", clk, 0);
    expect_eq("stopped: PRECLK high", preclk, 1);
    run = 1'b1; t0 = $time;
    @(posedge clk);
    expect_eq("restart delay", $time - t0, STP);
    // RUN low only while CLK is low: no effect.
    @(posedge clk);
    t0 = $time;
    @(negedge clk); #1ns; run = 1'b0; #1ns; run = 1'b1;
    @(posedge clk);
    expect_eq("short RUN dip, period", $time - t0, T);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
