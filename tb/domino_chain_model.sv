// domino_chain_model: behavioural model of an asynchronous domino datapath
// module with a four-phase REQ/ACK handshake, for simulation only.
//
// It stands for a chain of precharged domino buffers. With REQ low all
// stages precharge in parallel: ACK (and the data outputs) go low
// PRECHARGE_PS after REQ fell, provided REQ stays low that long. With REQ
// high after a completed precharge the evaluation ripples through the chain:
// dout = async_fn(din) and ACK rise after async_len(din) buffer delays, so
// the delay depends on the data. REQ rising before precharge has finished
// leaves ACK high and computes nothing new, as the real chain would.
// Time advances in steps of TICK_PS.
module domino_chain_model #(
  parameter int unsigned STAGE_PS     = 300,
  parameter int unsigned PRECHARGE_PS = 300,
  parameter int unsigned MIN_STAGES   = 15,
  parameter int unsigned SPREAD       = 15,
  parameter int unsigned TICK_PS      = 10
) (
  input  logic        req,
  input  logic [31:0] din,
  output logic        ack,
  output logic [31:0] dout
);
  timeunit 1ps; timeprecision 1ps;
  import gsla_tb_pkg::*;

  int unsigned pre_t;
  int unsigned eval_t;
  bit          precharged;
  int unsigned n_evals;

  initial begin
    ack = 1'b0; dout = '0; precharged = 1'b1; pre_t = 0; eval_t = 0; n_evals = 0;
    forever begin
      #(TICK_PS);
      if (!req) begin
        eval_t = 0;
        if (pre_t + TICK_PS >= PRECHARGE_PS) begin
          ack = 1'b0; dout = '0; precharged = 1'b1;
        end else begin
          pre_t += TICK_PS;
        end
      end else begin
        pre_t = 0;
        if (precharged && !ack) begin
          eval_t += TICK_PS;
          if (eval_t >= async_len(din, MIN_STAGES, SPREAD) * STAGE_PS) begin
            dout = async_fn(din); ack = 1'b1; precharged = 1'b0;
            n_evals++;
          end
        end
      end
    end
  end
endmodule
