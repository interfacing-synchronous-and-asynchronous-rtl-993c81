// pipe_reg: pipeline register, captures d on the rising edge of clk.
//
// In the synchronous pipeline clk is the stoppable clock CLK (the document's
// design uses true single-phase clocked latches that capture on the rising
// edge). In the pipelined interface controller one of these registers follows
// each asynchronous module and is clocked by the rising edge of its ACK. The
// register has no reset, like the latches it stands for; downstream logic
// must ignore it until it has been written.
module pipe_reg #(
  parameter int unsigned WIDTH = gsla_pkg::DATA_W
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge clk) q <= d;
endmodule
