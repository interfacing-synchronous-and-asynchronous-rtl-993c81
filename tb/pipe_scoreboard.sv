// pipe_scoreboard: checks a pipeline of asynchronous stages run by a
// stoppable clock, for simulation only.
//
// Data: on every rising clock edge after reset a cycle model updates
//   m_in[i]  <= stage_in[i]        (register in front of module i)
//   m_out[i] <= async_fn(m_in[i])  (result reaching stage_out[i])
// and on the falling edge async_in and stage_out are compared with it.
// Timing: each rising edge must come at max(previous edge + T_NOM_PS,
// rise of the AND of all ACKs + RUN_RISE_PS + STOP_PS), within TOL_PS.
// An edge later than previous + T_NOM_PS + TOL_PS counts as a stall, an
// edge at T_NOM_PS as a free-running cycle. When N_ASYNC > 1 it also counts
// which module was the last to finish.
module pipe_scoreboard #(
  parameter int unsigned N_ASYNC     = 2,
  parameter int unsigned T_NOM_PS    = 8232,
  parameter int unsigned RUN_RISE_PS = 0,
  parameter int unsigned STOP_PS     = 750,
  parameter int unsigned TOL_PS      = 30
) (
  input  logic                        clk,
  input  logic                        reset_n,
  input  logic [N_ASYNC-1:0][31:0]    stage_in,
  input  logic [N_ASYNC-1:0][31:0]    stage_out,
  input  logic [N_ASYNC-1:0][31:0]    async_in,
  input  logic [N_ASYNC-1:0]          ack
);
  timeunit 1ps; timeprecision 1ps;
  import gsla_tb_pkg::*;

  int unsigned checks, failures, edges, stalls, free_cycles;
  int unsigned last_slowest [N_ASYNC];
  logic [N_ASYNC-1:0][31:0] m_in, m_out;
  int unsigned valid;          // edges seen since reset
  time t_prev, t_and, exp_t, t_ack [N_ASYNC];

  initial begin
    checks = 0; failures = 0; edges = 0; stalls = 0; free_cycles = 0; valid = 0;
    t_prev = 0; t_and = 0;
    foreach (last_slowest[i]) last_slowest[i] = 0;
    foreach (t_ack[i]) t_ack[i] = 0;
  end

  for (genvar i = 0; i < N_ASYNC; i++) begin : g_ack
    always @(posedge ack[i]) t_ack[i] = $time;
  end
  always @(posedge (&ack)) t_and = $time;

  always @(posedge clk) begin
    if (!reset_n) begin
      valid <= 0;
    end else begin
      edges++;
      if (valid >= 1) begin
        exp_t = t_prev + T_NOM_PS;
        if (t_and > t_prev && t_and + RUN_RISE_PS + STOP_PS > exp_t)
          exp_t = t_and + RUN_RISE_PS + STOP_PS;
        checks++;
        if ($time + TOL_PS < exp_t || $time > exp_t + TOL_PS) begin
          failures++;
          $display("%0t scoreboard: clock edge expected at %0t", $time, exp_t);
        end
        if ($time > t_prev + T_NOM_PS + TOL_PS) begin
          int unsigned s;
          s = 0;
          stalls++;
          for (int k = 1; k < N_ASYNC; k++) if (t_ack[k] > t_ack[s]) s = k;
          last_slowest[s]++;
        end else begin
          free_cycles++;
        end
      end
      t_prev = $time;
      for (int k = 0; k < N_ASYNC; k++) begin
        m_in[k]  <= stage_in[k];
        m_out[k] <= async_fn(m_in[k]);
      end
      valid <= valid + 1;
    end
  end

  always @(negedge clk) begin
    if (reset_n && valid >= 2) begin
      for (int k = 0; k < N_ASYNC; k++) begin
        checks += 2;
        if (async_in[k] !== m_in[k]) begin
          failures++;
          $display("%0t scoreboard: async_in[%0d]=%h expected %h", $time, k, async_in[k], m_in[k]);
        end
        if (stage_out[k] !== m_out[k]) begin
          failures++;
          $display("%0t scoreboard: stage_out[%0d]=%h expected %h", $time, k, stage_out[k], m_out[k]);
        end
      end
    end
  end
endmodule
