// handshake_ctrl_pipelined_tb: checks the pipelined handshake controller.
// Directed sequence (reset, CLK rise -> REQ rise, ACK rise with CLK low ->
// REQ fall, ACK rise while CLK still high -> REQ waits for CLK to fall),
// then random stimulus obeying the rule that CLK does not rise while ACK is
// high. REQ is compared with a reference: high on reset or CLK high, low on
// ACK high with CLK low, held otherwise; both ACK outputs must follow ACK.
module handshake_ctrl_pipelined_tb;
  timeunit 1ps; timeprecision 1ps;

  logic reset_n, clk, ack, req, ack_reg, ack_run, ref_req;
  int unsigned checks = 0, failures = 0;

  handshake_ctrl_pipelined dut (.reset_n, .clk, .ack, .req, .ack_reg, .ack_run);

  task automatic check(input string what);
    if (!reset_n || clk) ref_req = 1'b1; else if (ack) ref_req = 1'b0;
    checks += 3;
    if (req !== ref_req) begin failures++; $display("%0t %s: req=%b expected %b", $time, what, req, ref_req); end
    if (ack_reg !== ack) begin failures++; $display("%0t %s: ack_reg wrong", $time, what); end
    if (ack_run !== ack) begin failures++; $display("%0t %s: ack_run wrong", $time, what); end
  endtask

  task automatic drive(input logic r, input logic c, input logic a, input string what);
    reset_n = r; ack = a; #5; clk = c; #5; check(what);
  endtask

  initial begin
    reset_n = 1'b0; clk = 1'b0; ack = 1'b0; #5;
    drive(0, 0, 0, "reset");
    drive(0, 0, 1, "module done during reset");
    if (req !== 1'b1) begin failures++; $display("REQ not high in reset"); end
    drive(1, 0, 1, "reset released");
    if (req !== 1'b0) begin failures++; $display("REQ did not fall (precharge) after reset"); end
    drive(1, 0, 0, "precharge done");
    drive(1, 1, 0, "CLK rises");
    if (req !== 1'b1) begin failures++; $display("REQ did not rise with CLK"); end
    drive(1, 1, 1, "fast module: ACK rises with CLK high");
    if (req !== 1'b1) begin failures++; $display("REQ fell while CLK high"); end
    drive(1, 0, 1, "CLK falls");
    if (req !== 1'b0) begin failures++; $display("REQ did not fall after CLK fell"); end
    drive(1, 0, 0, "precharge done");
    if (req !== 1'b0) begin failures++; $display("REQ rose without CLK"); end
    checks += 6;
    repeat (400) begin
      logic r, c, a;
      r = ($urandom % 16) != 0;
      c = 1'($urandom);
      a = 1'($urandom);
      if (r && c && !clk && a) c = 1'b0;   // CLK may not rise while ACK is high
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
