// pipe_reg_tb: q must take d on each rising edge of clk and hold it
// otherwise, including across a falling edge and while clk is held
// (a stopped clock).
module pipe_reg_tb;
  timeunit 1ps; timeprecision 1ps;

  logic        clk;
  logic [31:0] d, q, expect_q;
  int unsigned checks = 0, failures = 0;

  pipe_reg dut (.clk, .d, .q);

  initial begin
    clk = 1'b0; d = '0;
    repeat (200) begin
      d = $urandom; #2;
      clk = 1'b1; expect_q = d; #2;
      checks++;
      if (q !== expect_q) begin failures++; $display("%0t q=%h expected %h", $time, q, expect_q); end
      d = $urandom; #2;
      clk = 1'b0; #($urandom % 20 + 1);
      d = $urandom; #1;
      checks++;
      if (q !== expect_q) begin failures++; $display("%0t q changed without an edge", $time); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
