// basic_interface: synchronous pipeline stages with asynchronous modules
// inserted, controlled by the basic stoppable-clock interface controller.
//
// Every stage, synchronous or asynchronous, sits between registers clocked by
// the same stoppable clock CLK. For each asynchronous module i:
//   stage_in[i] -> register (CLK) -> async_in[i] -> module -> async_out[i]
//               -> register (CLK) -> stage_out[i]
// The synchronous logic between stages stays outside this module, unchanged.
// Each module gets a handshake controller that makes REQ fall (precharge)
// after CLK rises and rise (compute) when ACK falls. All ACKs are ANDed into
// RUN; the next rising edge of CLK waits until RUN is high, so a slow
// asynchronous computation stretches the clock instead of being sampled early.
// Data move through every module once per cycle, so no arbitration is needed
// and no signal is ever sampled while it may change: there is no
// metastability.
//
// BUFFERED = 0 is the basic controller: ring oscillator of 19 gates, RUN
// straight from the AND gate. BUFFERED = 1 is the variant for a large clock
// load: the clock buffer tree is part of the ring, the stop gate sits at its
// leaves and RUN reaches it through a tree of its own. N_ASYNC = 2 follows the
// pipeline figure; WIDTH is this design's own choice.
//
// Timing rules the asynchronous module must meet (from the controller):
// computation must end after CLK has fallen; with BUFFERED = 1, RUN must fall
// (ACK fall plus the RUN tree delay) before the ring is ready to raise CLK.
module basic_interface #(
  parameter int unsigned N_ASYNC  = 2,
  parameter int unsigned WIDTH    = gsla_pkg::DATA_W,
  parameter bit          BUFFERED = 1'b0,
  // Corner delays of the behavioural clock and RUN models (ps); the defaults
  // are the worst-case corner. INV_PS/STOP_PS apply to the ring in use.
  parameter int unsigned INV_PS      = BUFFERED ? gsla_pkg::BUF_INV_PS  : gsla_pkg::BASIC_INV_PS,
  parameter int unsigned STOP_PS     = BUFFERED ? gsla_pkg::BUF_STOP_PS : gsla_pkg::BASIC_STOP_PS,
  parameter int unsigned RUN_RISE_PS = gsla_pkg::RUN_RISE_PS,
  parameter int unsigned RUN_FALL_PS = gsla_pkg::RUN_FALL_PS
) (
  input  logic                            reset_n,
  // pipeline data around each asynchronous module
  input  logic [N_ASYNC-1:0][WIDTH-1:0]   stage_in,
  output logic [N_ASYNC-1:0][WIDTH-1:0]   stage_out,
  // asynchronous modules
  output logic [N_ASYNC-1:0][WIDTH-1:0]   async_in,
  input  logic [N_ASYNC-1:0][WIDTH-1:0]   async_out,
  output logic [N_ASYNC-1:0]              req,
  input  logic [N_ASYNC-1:0]              ack,
  // clocking
  output logic                            clk,
  output logic                            run
);
  timeunit 1ps; timeprecision 1ps;

  logic [N_ASYNC-1:0] ack_run;
  logic               run_and;
  logic               preclk;

  for (genvar i = 0; i < N_ASYNC; i++) begin : g_mod
    pipe_reg #(.WIDTH(WIDTH)) u_in_reg (
      .clk (clk), .d (stage_in[i]), .q (async_in[i])
    );
    handshake_ctrl u_hs (
      .reset_n (reset_n), .clk (clk), .ack (ack[i]),
      .req (req[i]), .ack_run (ack_run[i])
    );
    pipe_reg #(.WIDTH(WIDTH)) u_out_reg (
      .clk (clk), .d (async_out[i]), .q (stage_out[i])
    );
  end

  ack_and #(.N_ASYNC(N_ASYNC)) u_and (.ack (ack_run), .run (run_and));

  if (BUFFERED) begin : g_buffered
    buffer_tree #(
      .STAGES  (gsla_pkg::RING_TREE_STAGES),
      .RISE_PS (RUN_RISE_PS),
      .FALL_PS (RUN_FALL_PS)
    ) u_run_tree (.in (run_and), .out (run));
    buffered_stoppable_clock #(.NAND_POS(0), .INV_PS(INV_PS), .STOP_PS(STOP_PS)) u_clk (
      .reset_n (reset_n), .run (run), .clk (clk), .preclk (preclk)
    );
  end else begin : g_basic
    assign run = run_and;
    stoppable_clock #(.INV_PS(INV_PS), .STOP_PS(STOP_PS)) u_clk (
      .reset_n (reset_n), .run (run), .clk (clk), .preclk (preclk)
    );
  end
endmodule
