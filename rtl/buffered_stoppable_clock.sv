// buffered_stoppable_clock: behavioural model of the stoppable ring
// oscillator that uses the chip's clock buffer network as part of its ring.
// Delay loop, not synthesizable; the clock stop gate inside it is.
//
// A large clock load needs a tree of ever larger inverters, whose delay is
// close to half a clock period. Stopping the clock at its source would act
// half a cycle late, so here the tree is part of the oscillator and the clock
// stop gate sits at the leaves of the tree as its last two levels (512x gate,
// 2048x staticizer driving the global clock wire).
//
// The loop is: CLK -> feedback inverter -> 16 stages -> PRECLK -> stop gate
// -> CLK. The 16 stages are the reset NAND, PRE_INVS inverters and the
// TREE_STAGES levels of the buffer tree, in that order when NAND_POS is 0
// (the arrangement of the buffered controller). NAND_POS moves the NAND
// further down the chain; the pipelined controller moves it up into the
// buffer network so that the first clock edge after reset comes soon enough
// (its exact place is this design's choice). NAND_POS must be even so that
// reset holds CLK low. The clock period is 2*(17*INV_PS + STOP_PS); STOP_PS is
// the RUN-to-CLK delay. RUN must come through its own buffer tree.
// The ring is a combinational loop on purpose (lint tools report it as
// circular logic); it oscillates because every stage carries a delay.
module buffered_stoppable_clock #(
  parameter int unsigned PRE_INVS    = gsla_pkg::RING_PRE_INVS,
  parameter int unsigned TREE_STAGES = gsla_pkg::RING_TREE_STAGES,
  parameter int unsigned NAND_POS    = 0,
  parameter int unsigned INV_PS      = gsla_pkg::BUF_INV_PS,
  parameter int unsigned STOP_PS     = gsla_pkg::BUF_STOP_PS
) (
  input  logic reset_n,
  input  logic run,       // buffered RUN
  output logic clk,
  output logic preclk
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N_STG = 1 + PRE_INVS;   // NAND and inverters before the tree

  logic             clk_fb;
  logic [N_STG-1:0] chain;      // NAND and inverters ahead of the tree
  logic             clk_gate;

  assign #(INV_PS) clk_fb = ~clk;

  // Stages before the tree; stage NAND_POS (if it lies here) is the NAND.
  for (genvar i = 0; i < N_STG; i++) begin : g_pre
    if (i == NAND_POS) begin : g_nand
      if (i == 0) begin : g_first
        assign #(INV_PS) chain[i] = ~(reset_n & clk_fb);
      end else begin : g_mid
        assign #(INV_PS) chain[i] = ~(reset_n & chain[i-1]);
      end
    end else begin : g_inv
      if (i == 0) begin : g_first
        assign #(INV_PS) chain[i] = ~clk_fb;
      end else begin : g_mid
        assign #(INV_PS) chain[i] = ~chain[i-1];
      end
    end
  end

  // Clock buffer tree levels; stage N_STG + j.
  logic [TREE_STAGES-1:0] tree;
  for (genvar j = 0; j < TREE_STAGES; j++) begin : g_tree
    if (N_STG + j == NAND_POS) begin : g_nand
      if (j == 0) begin : g_first
        assign #(INV_PS) tree[j] = ~(reset_n & chain[N_STG-1]);
      end else begin : g_mid
        assign #(INV_PS) tree[j] = ~(reset_n & tree[j-1]);
      end
    end else begin : g_inv
      if (j == 0) begin : g_first
        assign #(INV_PS) tree[j] = ~chain[N_STG-1];
      end else begin : g_mid
        assign #(INV_PS) tree[j] = ~tree[j-1];
      end
    end
  end

  assign preclk = tree[TREE_STAGES-1];

  clock_stop_gate u_stop (
    .preclk (preclk),
    .run    (run),
    .clk    (clk_gate)
  );

  assign #(STOP_PS) clk = clk_gate;

  initial begin
    assert (NAND_POS % 2 == 0 && NAND_POS < N_STG + TREE_STAGES)
      else $error("buffered_stoppable_clock: NAND_POS must be even and inside the ring");
  end
endmodule
