// handshake_ctrl_tb: checks the basic handshake controller.
// A directed four-phase sequence (reset, CLK rise -> REQ fall, ACK fall ->
// REQ rise, ACK rise, CLK fall) is followed by random stimulus that obeys
// the controller's rule that ACK does not rise while CLK is high. REQ is
// compared with a reference: high on reset or ACK low, low on ACK and CLK
// high, held otherwise.
module handshake_ctrl_tb;
  timeunit 1ps; timeprecision 1ps;

  logic reset_n, clk, ack, req, ack_run, ref_req;
  int unsigned checks = 0, failures = 0;

  handshake_ctrl dut (.reset_n, .clk, .ack, .req, .ack_run);

  task automatic check(input string what);
    if (!reset_n || !ack) ref_req = 1'b1; else if (clk) ref_req = 1'b0;
    checks += 2;
    if (req !== ref_req) begin failures++; $display("%0t %s: req=%b expected %b", $time, what, req, ref_req); end
    if (ack_run !== ack) begin failures++; $display("%0t %s: ack_run wrong", $time, what); end
  endtask

  task automatic drive(input logic r, input logic c, input logic a, input string what);
    reset_n = r; clk = c; #5; ack = a; #5; check(what);
  endtask

  initial begin
    reset_n = 1'b0; clk = 1'b0; ack = 1'b0; #5;
    drive(0, 0, 0, "reset, ack low");
    if (req !== 1'b1) begin failures++; $display("REQ not high in reset"); end
    drive(0, 0, 1, "module done during reset");
    drive(1, 0, 1, "reset released");
    drive(1, 1, 1, "CLK rises");
    if (req !== 1'b0) begin failures++; $display("REQ did not fall after CLK rose"); end
    drive(1, 1, 0, "precharge done");
    if (req !== 1'b1) begin failures++; $display("REQ did not rise after ACK fell"); end
    drive(1, 0, 0, "CLK falls");
    drive(1, 0, 1, "computation done");
    if (req !== 1'b1) begin failures++; $display("REQ fell without CLK"); end
    checks += 4;
    repeat (400) begin
      logic r, c, a;
      r = ($urandom % 16) != 0;
      c = 1'($urandom);
      a = 1'($urandom);
      if (r && c && a && !ack) a = 1'b0;   // ACK may not rise while CLK is high
      drive(r, c, a, "random");
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
