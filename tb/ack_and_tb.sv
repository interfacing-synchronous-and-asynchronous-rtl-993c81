// ack_and_tb: RUN must be high exactly when every ACK is high, for the
// default two modules and for five.
module ack_and_tb;
  timeunit 1ps; timeprecision 1ps;

  logic [1:0] ack2;
  logic [4:0] ack5;
  logic       run2, run5;
  int unsigned checks = 0, failures = 0;

  ack_and                u2 (.ack (ack2), .run (run2));
  ack_and #(.N_ASYNC(5)) u5 (.ack (ack5), .run (run5));

  initial begin
    for (int v = 0; v < 4; v++) begin
      ack2 = 2'(v); #1;
      checks++;
      if (run2 !== (v == 3)) begin failures++; $display("ack=%b run=%b", ack2, run2); end
    end
    for (int v = 0; v < 32; v++) begin
      ack5 = 5'(v); #1;
      checks++;
      if (run5 !== (v == 31)) begin failures++; $display("ack=%b run=%b", ack5, run5); end
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
