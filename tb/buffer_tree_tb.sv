// buffer_tree_tb: measures the delays of the buffer tree model. The default
// ten-level tree must give 3.16 ns for a rising and 2.83 ns for a falling
// output and not invert; a three-level tree must invert. A pulse shorter
// than the delay (as RUN is in the pipelined controller) must come out whole.
module buffer_tree_tb;
  timeunit 1ps; timeprecision 1ps;

  logic in10, out10, in3, out3;
  int unsigned checks = 0, failures = 0;
  time t_r, t_f, t_in;

  buffer_tree u10 (.in (in10), .out (out10));
  buffer_tree #(.STAGES(3), .RISE_PS(900), .FALL_PS(700)) u3 (.in (in3), .out (out3));

  always @(posedge out10) t_r = $time;
  always @(negedge out10) t_f = $time;

  task automatic expect_eq(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin failures++; $display("%s: %0d expected %0d", what, got, want); end
  endtask

  initial begin
    in10 = 1'b0; in3 = 1'b1;
    #10ns;
    expect_eq("10-level idle", out10, 0);
    expect_eq("3-level idle inverts", out3, 0);
    repeat (5) begin
      in10 = 1'b1; t_in = $time; #10ns;
      expect_eq("rise delay", t_r - t_in, 3160);
      in10 = 1'b0; t_in = $time; #10ns;
      expect_eq("fall delay", t_f - t_in, 2830);
    end
    // 1 ns pulse through a 3 ns tree
    in10 = 1'b1; t_in = $time; #1ns; in10 = 1'b0; #10ns;
    expect_eq("short pulse rise", t_r - t_in, 3160);
    expect_eq("short pulse fall", t_f - t_in, 1000 + 2830);
    in3 = 1'b0; #950;
    expect_eq("3-level rising output", out3, 1);
    in3 = 1'b1; #600;
    expect_eq("3-level not yet fallen", out3, 1);
    #200;
    expect_eq("3-level falling output", out3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
