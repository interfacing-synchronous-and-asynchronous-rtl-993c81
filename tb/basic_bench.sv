// basic_bench: one basic_interface with its asynchronous modules modelled by
// domino chains, the synchronous logic between them modelled by sync_fn, and
// a scoreboard. Stage 0 is fed fresh random data every cycle; stage k>0 gets
// sync_fn of stage k-1's output. Reset is held until the modules have raised
// ACK, then released; delays are those of one corner (worst case by default); NCYC clock edges are run and `done` is raised.
module basic_bench #(
  parameter bit          BUFFERED    = 1'b0,
  parameter int unsigned N_ASYNC     = 2,
  parameter int unsigned NCYC        = 200,
  parameter int unsigned INV_PS      = BUFFERED ? gsla_pkg::BUF_INV_PS  : gsla_pkg::BASIC_INV_PS,
  parameter int unsigned STOP_PS     = BUFFERED ? gsla_pkg::BUF_STOP_PS : gsla_pkg::BASIC_STOP_PS,
  parameter int unsigned RUN_RISE_PS = gsla_pkg::RUN_RISE_PS,
  parameter int unsigned RUN_FALL_PS = gsla_pkg::RUN_FALL_PS,
  parameter int unsigned STAGE_PS    = 300
) (
  output logic        done,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned stalls,
  output int unsigned free_cycles
);
  timeunit 1ps; timeprecision 1ps;
  import gsla_tb_pkg::*;

  localparam int unsigned T_NOM_PS = 2 * (17 * INV_PS + STOP_PS);

  logic                      reset_n;
  logic [N_ASYNC-1:0][31:0]  stage_in, stage_out, async_in, async_out;
  logic [N_ASYNC-1:0]        req, ack;
  logic                      clk, run;
  logic [31:0]               src;

  basic_interface #(.N_ASYNC(N_ASYNC), .WIDTH(32), .BUFFERED(BUFFERED), .INV_PS(INV_PS),
                    .STOP_PS(STOP_PS), .RUN_RISE_PS(RUN_RISE_PS), .RUN_FALL_PS(RUN_FALL_PS)) dut (
    .reset_n, .stage_in, .stage_out, .async_in, .async_out, .req, .ack, .clk, .run
  );

  for (genvar i = 0; i < N_ASYNC; i++) begin : g_mod
    domino_chain_model #(.STAGE_PS(STAGE_PS), .PRECHARGE_PS(STAGE_PS), .MIN_STAGES(15), .SPREAD(15)) u_async (
      .req (req[i]), .din (async_in[i]), .ack (ack[i]), .dout (async_out[i])
    );
    if (i == 0) begin : g_src
      assign stage_in[i] = src;
    end else begin : g_sync
      assign stage_in[i] = sync_fn(stage_out[i-1]);
    end
  end

  pipe_scoreboard #(.N_ASYNC(N_ASYNC), .T_NOM_PS(T_NOM_PS), .RUN_RISE_PS(BUFFERED ? RUN_RISE_PS : 0),
                    .STOP_PS(STOP_PS)) sb (
    .clk, .reset_n, .stage_in, .stage_out, .async_in, .ack
  );

  assign checks      = sb.checks;
  assign failures    = sb.failures;
  assign stalls      = sb.stalls;
  assign free_cycles = sb.free_cycles;

  always @(negedge clk) src <= $urandom;

  initial begin
    done = 1'b0; reset_n = 1'b0; src = $urandom;
    #20ns;
    reset_n = 1'b1;
    repeat (NCYC) @(posedge clk);
    #1ns;
    done = 1'b1;
  end
endmodule
