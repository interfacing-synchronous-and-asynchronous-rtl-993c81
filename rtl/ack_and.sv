// ack_and: collects the acknowledge signals of all asynchronous modules.
//
// RUN is high only when every asynchronous module has finished computing, so
// the next rising clock edge waits for the slowest module. Combinational, one
// input per module; N_ASYNC follows the two asynchronous modules drawn in the
// document's pipeline figures.
module ack_and #(
  parameter int unsigned N_ASYNC = 2
) (
  input  logic [N_ASYNC-1:0] ack,
  output logic               run
);
  timeunit 1ps; timeprecision 1ps;

  assign run = &ack;
endmodule
