// buffered_stoppable_clock_tb: checks the ring oscillator that contains the
// clock buffer tree.
//   * reset holds CLK low; with the reset NAND at the head of the ring the
//     first edge comes 16*205 + 490 = 3.77 ns after release; with it at
//     position 8 (first level of the tree) 8*205 + 490 = 2.13 ns;
//   * free-running period 2*(17*205 + 490) = 7.95 ns, 50% duty cycle;
//   * RUN lowered after CLK rises stops the next edge; CLK rises 490 ps after
//     RUN returns.
module buffered_stoppable_clock_tb;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned INV = gsla_pkg::BUF_INV_PS;
  localparam int unsigned STP = gsla_pkg::BUF_STOP_PS;
  localparam int unsigned T   = 2 * (17 * INV + STP);

  logic reset_n, run, clk, preclk, clk8, preclk8;
  int unsigned checks = 0, failures = 0, rises = 0;
  time t0;

  buffered_stoppable_clock dut (.reset_n, .run, .clk, .preclk);
  buffered_stoppable_clock #(.NAND_POS(8)) dut8 (.reset_n, .run, .clk (clk8), .preclk (preclk8));

  always @(posedge clk) rises++;

  task automatic expect_eq(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin failures++; $display("%0t %s: %0d expected %0d", $time, what, got, want); end
  endtask

  initial begin
    reset_n = 1'b0; run = 1'b1;
    #20ns;
    expect_eq("CLK low in reset", clk, 0);
    expect_eq("CLK low in reset (NAND at 8)", clk8, 0);
    rises = 0; #20ns;
    expect_eq("no edge in reset", rises, 0);
    reset_n = 1'b1; t0 = $time;
    fork
      begin @(posedge clk);  expect_eq("first edge", $time - t0, 16 * INV + STP); end
      begin @(posedge clk8); expect_eq("first edge (NAND at 8)", $time - t0, 8 * INV + STP); end
    join
    t0 = $time;
    repeat (5) begin
      @(posedge clk);
      expect_eq("period", $time - t0, T);
      t0 = $time;
      @(negedge clk);
      expect_eq("high time", $time - t0, T / 2);
    end
    @(posedge clk); #1ns; run = 1'b0;
    rises = 0; #30ns;
    expect_eq("stopped: no edge", rises, 0);
    expect_eq("stopped: CLK low", clk, 0);
    run = 1'b1; t0 = $time;
    @(posedge clk);
    expect_eq("restart delay", $time - t0, STP);
    t0 = $time;
    @(posedge clk);
    expect_eq("period after restart", $time - t0, T);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
