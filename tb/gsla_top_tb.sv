// gsla_top_tb: end-to-end test of both interface controllers at their
// default sizes and worst-case corner delays.
//
// Each side's asynchronous modules are domino-chain models with
// data-dependent delay; the synchronous logic between stages is sync_fn.
// Scoreboards check every value through the pipelines and the time of every
// clock edge. Counted mechanisms, each of which must occur:
//   reset          both stoppable clocks held low during reset
//   p_stall        pipelined side: edge delayed by a late ACK
//   p_free         pipelined side: edge at the ring's own period
//   p_ack_capture  pipelined side: result captured on ACK rising
//   b_stall        basic side: edge delayed by a late ACK
//   b_free         basic side: edge at the ring's own period
//   b_last0/b_last1  basic side: stall caused by module 0 / module 1
//                  being the last one to finish (the AND of the ACKs)
module gsla_top_tb;
  timeunit 1ps; timeprecision 1ps;
  import gsla_tb_pkg::*;

  localparam int unsigned NCYC = 300;
  localparam int unsigned P_T  = 2 * (17 * gsla_pkg::PIPE_INV_PS + gsla_pkg::PIPE_STOP_PS);
  localparam int unsigned B_T  = 2 * (17 * gsla_pkg::BASIC_INV_PS + gsla_pkg::BASIC_STOP_PS);

  logic              p_reset_n, b_reset_n;
  logic [0:0][31:0]  p_stage_in, p_stage_out, p_async_in, p_async_out, p_ack_q;
  logic [0:0]        p_req, p_ack;
  logic              p_clk, p_run;
  logic [1:0][31:0]  b_stage_in, b_stage_out, b_async_in, b_async_out;
  logic [1:0]        b_req, b_ack;
  logic              b_clk, b_run;
  logic [31:0]       p_src, b_src;

  int unsigned checks = 0, failures = 0;
  int unsigned n_reset = 0, n_ack_capture = 0;
  int unsigned p_edges = 0, b_edges = 0;

  gsla_top dut (
    .p_reset_n, .p_stage_in, .p_stage_out, .p_async_in, .p_async_out, .p_ack_q,
    .p_req, .p_ack, .p_clk, .p_run,
    .b_reset_n, .b_stage_in, .b_stage_out, .b_async_in, .b_async_out,
    .b_req, .b_ack, .b_clk, .b_run
  );

  // Pipelined side: one module, precharge 1.16 ns, 16..31 buffers of 300 ps.
  domino_chain_model #(.STAGE_PS(300), .PRECHARGE_PS(1160), .MIN_STAGES(16), .SPREAD(15)) u_pmod (
    .req (p_req[0]), .din (p_async_in[0]), .ack (p_ack[0]), .dout (p_async_out[0])
  );
  assign p_stage_in[0] = p_src;

  // Basic side: two modules, one-buffer precharge, 15..30 buffers of 300 ps.
  domino_chain_model #(.STAGE_PS(300), .PRECHARGE_PS(300), .MIN_STAGES(15), .SPREAD(15)) u_bmod0 (
    .req (b_req[0]), .din (b_async_in[0]), .ack (b_ack[0]), .dout (b_async_out[0])
  );
  domino_chain_model #(.STAGE_PS(300), .PRECHARGE_PS(300), .MIN_STAGES(15), .SPREAD(15)) u_bmod1 (
    .req (b_req[1]), .din (b_async_in[1]), .ack (b_ack[1]), .dout (b_async_out[1])
  );
  assign b_stage_in[0] = b_src;
  assign b_stage_in[1] = sync_fn(b_stage_out[0]);

  pipe_scoreboard #(.N_ASYNC(1), .T_NOM_PS(P_T), .RUN_RISE_PS(gsla_pkg::PIPE_RUN_RISE_PS),
                    .STOP_PS(gsla_pkg::PIPE_STOP_PS)) p_sb (
    .clk (p_clk), .reset_n (p_reset_n), .stage_in (p_stage_in), .stage_out (p_stage_out),
    .async_in (p_async_in), .ack (p_ack)
  );
  pipe_scoreboard #(.N_ASYNC(2), .T_NOM_PS(B_T), .RUN_RISE_PS(0),
                    .STOP_PS(gsla_pkg::BASIC_STOP_PS)) b_sb (
    .clk (b_clk), .reset_n (b_reset_n), .stage_in (b_stage_in), .stage_out (b_stage_out),
    .async_in (b_async_in), .ack (b_ack)
  );

  always @(negedge p_clk) p_src <= $urandom;
  always @(negedge b_clk) b_src <= $urandom;
  always @(posedge p_clk) if (p_reset_n) p_edges++;
  always @(posedge b_clk) if (b_reset_n) b_edges++;

  // Result captured into the ACK register of the pipelined side.
  always @(posedge p_ack[0]) begin
    #1;
    if (p_reset_n) begin
      checks++;
      if (p_ack_q[0] === async_fn(p_async_in[0])) n_ack_capture++;
      else begin
        failures++;
        $display("%0t p_ack_q=%h expected %h", $time, p_ack_q[0], async_fn(p_async_in[0]));
      end
    end
  end

  task automatic need(input string what, input int unsigned n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never seen: %s", what); end
  endtask

  initial begin
    p_reset_n = 1'b0; b_reset_n = 1'b0; p_src = $urandom; b_src = $urandom;
    #20ns;
    checks += 2;
    if (p_clk === 1'b0 && b_clk === 1'b0) n_reset++;
    else begin failures++; $display("clock not held low in reset"); end
    if (p_edges != 0 || b_edges != 0) failures++;
    p_reset_n = 1'b1; b_reset_n = 1'b1;
    wait (p_edges >= NCYC && b_edges >= NCYC);
    #1ns;
    checks   += p_sb.checks + b_sb.checks;
    failures += p_sb.failures + b_sb.failures;
    need("reset", n_reset);
    need("p_stall", p_sb.stalls);
    need("p_free", p_sb.free_cycles);
    need("p_ack_capture", n_ack_capture);
    need("b_stall", b_sb.stalls);
    need("b_free", b_sb.free_cycles);
    need("b_last0", b_sb.last_slowest[0]);
    need("b_last1", b_sb.last_slowest[1]);
    $display("pipelined: edges=%0d stalls=%0d free=%0d ack_captures=%0d",
             p_edges, p_sb.stalls, p_sb.free_cycles, n_ack_capture);
    $display("basic:     edges=%0d stalls=%0d (module0 last %0d, module1 last %0d) free=%0d",
             b_edges, b_sb.stalls, b_sb.last_slowest[0], b_sb.last_slowest[1], b_sb.free_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20us;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
