// gsla_top: the two interface controllers for mixing asynchronous modules into
// a synchronous pipeline, side by side.
//
//   p_*  pipelined interface controller (the design for chips with a large
//        clock buffer network): extra ACK-clocked register after each
//        asynchronous module, buffered RUN, stop gate at the clock tree leaves.
//   b_*  basic interface controller: small ring oscillator, RUN straight from
//        the AND of the ACKs, registers clocked by CLK only.
// Each side has its own reset, its own stoppable clock, and brings out the
// REQ/ACK/data ports of its asynchronous modules and the data ports of the
// synchronous logic between stages, which are not part of this design.
// P_N_ASYNC (1) and B_N_ASYNC (2) are the numbers of asynchronous modules on
// each side; see pipelined_interface for why the pipelined side defaults to
// one. WIDTH, the datapath width, is this design's own choice.
module gsla_top #(
  parameter int unsigned P_N_ASYNC = 1,
  parameter int unsigned B_N_ASYNC = 2,
  parameter int unsigned WIDTH     = gsla_pkg::DATA_W
) (
  // pipelined interface controller
  input  logic                            p_reset_n,
  input  logic [P_N_ASYNC-1:0][WIDTH-1:0]   p_stage_in,
  output logic [P_N_ASYNC-1:0][WIDTH-1:0]   p_stage_out,
  output logic [P_N_ASYNC-1:0][WIDTH-1:0]   p_async_in,
  input  logic [P_N_ASYNC-1:0][WIDTH-1:0]   p_async_out,
  output logic [P_N_ASYNC-1:0][WIDTH-1:0]   p_ack_q,
  output logic [P_N_ASYNC-1:0]              p_req,
  input  logic [P_N_ASYNC-1:0]              p_ack,
  output logic                            p_clk,
  output logic                            p_run,
  // basic interface controller
  input  logic                            b_reset_n,
  input  logic [B_N_ASYNC-1:0][WIDTH-1:0]   b_stage_in,
  output logic [B_N_ASYNC-1:0][WIDTH-1:0]   b_stage_out,
  output logic [B_N_ASYNC-1:0][WIDTH-1:0]   b_async_in,
  input  logic [B_N_ASYNC-1:0][WIDTH-1:0]   b_async_out,
  output logic [B_N_ASYNC-1:0]              b_req,
  input  logic [B_N_ASYNC-1:0]              b_ack,
  output logic                            b_clk,
  output logic                            b_run
);
  timeunit 1ps; timeprecision 1ps;

  pipelined_interface #(.N_ASYNC(P_N_ASYNC), .WIDTH(WIDTH)) u_pipelined (
    .reset_n   (p_reset_n),
    .stage_in  (p_stage_in),
    .stage_out (p_stage_out),
    .async_in  (p_async_in),
    .async_out (p_async_out),
    .ack_q     (p_ack_q),
    .req       (p_req),
    .ack       (p_ack),
    .clk       (p_clk),
    .run       (p_run)
  );

  basic_interface #(.N_ASYNC(B_N_ASYNC), .WIDTH(WIDTH), .BUFFERED(1'b0)) u_basic (
    .reset_n   (b_reset_n),
    .stage_in  (b_stage_in),
    .stage_out (b_stage_out),
    .async_in  (b_async_in),
    .async_out (b_async_out),
    .req       (b_req),
    .ack       (b_ack),
    .clk       (b_clk),
    .run       (b_run)
  );
endmodule
