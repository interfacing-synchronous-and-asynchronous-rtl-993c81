// pipelined_interface: synchronous pipeline with asynchronous modules under
// the pipelined interface controller, for chips with a large clock network.
//
// With a clock buffer tree the slowest part of the control loop is RUN
// travelling through its own buffer tree (about 30% of a cycle). Here an extra
// register follows each asynchronous module and captures its result on the
// rising edge of ACK, so the module may precharge at once, in parallel with
// RUN's trip to the clock stop gate. For module i:
//   stage_in[i] -> register (CLK) -> async_in[i] -> module -> async_out[i]
//               -> register (ACK rise) -> ack_q[i] -> register (CLK)
//               -> stage_out[i]
// The handshake: CLK rising raises REQ (compute); ACK rising latches the
// result and, once CLK is low, lowers REQ (precharge); ACK falls when
// precharge is done. All ACKs are ANDed and buffered into RUN; RUN high lets
// the stop gate at the leaves of the clock tree raise CLK, so the next edge
// waits for the slowest module. Because RUN is a delayed copy of ACK it is a
// pulse: CLK must rise while it is high. Hence two rules on each module:
// ACK must fall before CLK rises, and must not fall so early that RUN falls
// before the ring is ready to raise CLK (add a minimum delay to a module
// fast enough to break it).
//
// The reset NAND of the ring sits inside the clock tree (NAND_POS, this
// design's choice of place), so the first edge after reset is not overtaken
// by RUN falling. Delay defaults are the worst-case corner. WIDTH is this
// design's choice.
//
// N_ASYNC defaults to 1, the configuration the document characterises. With
// several modules each ACK is only a short pulse (from the end of computation
// to the end of precharge), so the AND that forms RUN is high only if the
// pulses of all modules overlap; N_ASYNC > 1 works only for modules whose
// completion times lie within one precharge time of each other.
module pipelined_interface #(
  parameter int unsigned N_ASYNC  = 1,
  parameter int unsigned WIDTH    = gsla_pkg::DATA_W,
  parameter int unsigned NAND_POS = 8,
  // Corner delays of the behavioural clock and RUN models (ps); the defaults
  // are the worst-case corner.
  parameter int unsigned INV_PS      = gsla_pkg::PIPE_INV_PS,
  parameter int unsigned STOP_PS     = gsla_pkg::PIPE_STOP_PS,
  parameter int unsigned RUN_RISE_PS = gsla_pkg::PIPE_RUN_RISE_PS,
  parameter int unsigned RUN_FALL_PS = gsla_pkg::PIPE_RUN_FALL_PS
) (
  input  logic                            reset_n,
  input  logic [N_ASYNC-1:0][WIDTH-1:0]   stage_in,
  output logic [N_ASYNC-1:0][WIDTH-1:0]   stage_out,
  output logic [N_ASYNC-1:0][WIDTH-1:0]   async_in,
  input  logic [N_ASYNC-1:0][WIDTH-1:0]   async_out,
  output logic [N_ASYNC-1:0][WIDTH-1:0]   ack_q,     // results latched on ACK
  output logic [N_ASYNC-1:0]              req,
  input  logic [N_ASYNC-1:0]              ack,
  output logic                            clk,
  output logic                            run
);
  timeunit 1ps; timeprecision 1ps;

  logic [N_ASYNC-1:0] ack_run;
  logic [N_ASYNC-1:0] ack_clk;
  logic               run_and;
  logic               preclk;

  for (genvar i = 0; i < N_ASYNC; i++) begin : g_mod
    pipe_reg #(.WIDTH(WIDTH)) u_in_reg (
      .clk (clk), .d (stage_in[i]), .q (async_in[i])
    );
    handshake_ctrl_pipelined u_hs (
      .reset_n (reset_n), .clk (clk), .ack (ack[i]),
      .req (req[i]), .ack_reg (ack_clk[i]), .ack_run (ack_run[i])
    );
    pipe_reg #(.WIDTH(WIDTH)) u_ack_reg (
      .clk (ack_clk[i]), .d (async_out[i]), .q (ack_q[i])
    );
    pipe_reg #(.WIDTH(WIDTH)) u_out_reg (
      .clk (clk), .d (ack_q[i]), .q (stage_out[i])
    );
  end

  ack_and #(.N_ASYNC(N_ASYNC)) u_and (.ack (ack_run), .run (run_and));

  buffer_tree #(
    .STAGES  (gsla_pkg::RING_TREE_STAGES),
    .RISE_PS (RUN_RISE_PS),
    .FALL_PS (RUN_FALL_PS)
  ) u_run_tree (.in (run_and), .out (run));

  buffered_stoppable_clock #(
    .NAND_POS (NAND_POS),
    .INV_PS   (INV_PS),
    .STOP_PS  (STOP_PS)
  ) u_clk (
    .reset_n (reset_n), .run (run), .clk (clk), .preclk (preclk)
  );
endmodule
