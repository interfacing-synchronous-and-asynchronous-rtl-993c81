// pipelined_bench: one pipelined_interface with its asynchronous modules
// modelled by domino chains (precharge 1.16 ns, evaluation of 16 to
// 16+SPREAD buffers of 300 ps at the worst-case corner, the lower bound acting as the minimum delay
// the protocol needs), sync_fn between stages and a scoreboard. It also
// checks the ACK-clocked register: at every rise of ACK the value captured
// must be async_fn of the module input. Reset is released after the modules
// have raised ACK; NCYC clock edges are run and `done` is raised.
module pipelined_bench #(
  parameter int unsigned N_ASYNC  = 1,
  parameter int unsigned NAND_POS = 8,
  parameter int unsigned SPREAD   = 15,
  parameter int unsigned NCYC     = 200,
  parameter int unsigned INV_PS       = gsla_pkg::PIPE_INV_PS,
  parameter int unsigned STOP_PS      = gsla_pkg::PIPE_STOP_PS,
  parameter int unsigned RUN_RISE_PS  = gsla_pkg::PIPE_RUN_RISE_PS,
  parameter int unsigned RUN_FALL_PS  = gsla_pkg::PIPE_RUN_FALL_PS,
  parameter int unsigned STAGE_PS     = 300,
  parameter int unsigned PRECHARGE_PS = 1160
) (
  output logic        done,
  output logic        started,     // at least one clock edge after reset
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned stalls,
  output int unsigned free_cycles
);
  timeunit 1ps; timeprecision 1ps;
  import gsla_tb_pkg::*;

  localparam int unsigned T_NOM_PS = 2 * (17 * INV_PS + STOP_PS);

  logic                      reset_n;
  logic [N_ASYNC-1:0][31:0]  stage_in, stage_out, async_in, async_out, ack_q;
  logic [N_ASYNC-1:0]        req, ack;
  logic                      clk, run;
  logic [31:0]               src;
  int unsigned               ack_checks, ack_fail;

  pipelined_interface #(.N_ASYNC(N_ASYNC), .WIDTH(32), .NAND_POS(NAND_POS), .INV_PS(INV_PS),
                        .STOP_PS(STOP_PS), .RUN_RISE_PS(RUN_RISE_PS), .RUN_FALL_PS(RUN_FALL_PS)) dut (
    .reset_n, .stage_in, .stage_out, .async_in, .async_out, .ack_q, .req, .ack, .clk, .run
  );

  for (genvar i = 0; i < N_ASYNC; i++) begin : g_mod
    domino_chain_model #(.STAGE_PS(STAGE_PS), .PRECHARGE_PS(PRECHARGE_PS), .MIN_STAGES(16), .SPREAD(SPREAD)) u_async (
      .req (req[i]), .din (async_in[i]), .ack (ack[i]), .dout (async_out[i])
    );
    if (i == 0) begin : g_src
      assign stage_in[i] = src;
    end else begin : g_sync
      assign stage_in[i] = sync_fn(stage_out[i-1]);
    end
    // The ACK register must hold the module's result just after ACK rises.
    always @(posedge ack[i]) begin
      #1;
      if (reset_n) begin
        ack_checks++;
        if (ack_q[i] !== async_fn(async_in[i])) begin
          ack_fail++;
          $display("%0t ack_q[%0d]=%h expected %h", $time, i, ack_q[i], async_fn(async_in[i]));
        end
      end
    end
  end

  pipe_scoreboard #(.N_ASYNC(N_ASYNC), .T_NOM_PS(T_NOM_PS),
                    .RUN_RISE_PS(RUN_RISE_PS),
                    .STOP_PS(STOP_PS)) sb (
    .clk, .reset_n, .stage_in, .stage_out, .async_in, .ack
  );

  assign checks      = sb.checks + ack_checks;
  assign failures    = sb.failures + ack_fail;
  assign stalls      = sb.stalls;
  assign free_cycles = sb.free_cycles;
  assign started     = (sb.edges > 0);

  always @(negedge clk) src <= $urandom;

  initial begin
    done = 1'b0; reset_n = 1'b0; src = $urandom; ack_checks = 0; ack_fail = 0;
    #20ns;
    reset_n = 1'b1;
    repeat (NCYC) @(posedge clk);
    #1ns;
    done = 1'b1;
  end
endmodule
