// corners_tb: runs the three controller configurations at the four process,
// voltage and temperature corners that were characterised:
//   0: 90 C, 3.0 V, slow devices    1: 70 C, 3.3 V, typical
//   2: 25 C, 3.3 V, typical         3:  0 C, 3.6 V, fast devices
// For each corner the ring gate delay and stop-gate delay are fitted to the
// measured cycle time and ACK/RUN-to-CLK delay, the RUN tree to the measured
// ACK-to-RUN delay (its falling delay scaled from about 2.1 ns at the worst
// corner), and the domino buffer delay of the datapath model is scaled with
// the cycle time, as all on-chip delays track each other. Each run checks
// the data and every clock edge (scoreboard) and must show stalled and
// free-running cycles; the modelled free-running period must be within
// 0.5% of the measured one.
module corners_tb;
  timeunit 1ps; timeprecision 1ps;

  // measured cycle times (ps)
  localparam int unsigned T_BASIC [4] = '{8220, 5420, 4020, 3510};
  localparam int unsigned T_BUF   [4] = '{7940, 5580, 4980, 3660};
  localparam int unsigned T_PIPE  [4] = '{7790, 5440, 4930, 3640};
  // basic ring
  localparam int unsigned B_INV   [4] = '{198, 122, 85, 75};
  localparam int unsigned B_STOP  [4] = '{750, 640, 570, 480};
  localparam int unsigned B_STAGE [4] = '{300, 198, 147, 128};
  // buffered ring
  localparam int unsigned U_INV   [4] = '{205, 144, 129, 94};
  localparam int unsigned U_STOP  [4] = '{490, 340, 300, 230};
  localparam int unsigned U_RISE  [4] = '{2320, 1620, 1470, 1100};
  localparam int unsigned U_FALL  [4] = '{2100, 1466, 1331, 996};
  localparam int unsigned U_STAGE [4] = '{300, 211, 188, 138};
  // pipelined controller
  localparam int unsigned P_INV   [4] = '{203, 140, 127, 94};
  localparam int unsigned P_STOP  [4] = '{450, 340, 300, 230};
  localparam int unsigned P_RISE  [4] = '{2180, 1520, 1390, 1030};
  localparam int unsigned P_FALL  [4] = '{2100, 1464, 1339, 992};
  localparam int unsigned P_PRE   [4] = '{1160, 820, 750, 550};
  localparam int unsigned P_STAGE [4] = '{300, 209, 190, 140};

  logic        done_b [4], done_u [4], done_p [4], started_p [4];
  int unsigned ck_b [4], fl_b [4], st_b [4], fr_b [4];
  int unsigned ck_u [4], fl_u [4], st_u [4], fr_u [4];
  int unsigned ck_p [4], fl_p [4], st_p [4], fr_p [4];
  int unsigned checks = 0, failures = 0;

  for (genvar c = 0; c < 4; c++) begin : g_corner
    basic_bench #(.BUFFERED(1'b0), .NCYC(150), .INV_PS(B_INV[c]), .STOP_PS(B_STOP[c]),
                  .STAGE_PS(B_STAGE[c])) u_basic (
      .done (done_b[c]), .checks (ck_b[c]), .failures (fl_b[c]), .stalls (st_b[c]),
      .free_cycles (fr_b[c])
    );
    basic_bench #(.BUFFERED(1'b1), .NCYC(150), .INV_PS(U_INV[c]), .STOP_PS(U_STOP[c]),
                  .RUN_RISE_PS(U_RISE[c]), .RUN_FALL_PS(U_FALL[c]),
                  .STAGE_PS(U_STAGE[c])) u_buf (
      .done (done_u[c]), .checks (ck_u[c]), .failures (fl_u[c]), .stalls (st_u[c]),
      .free_cycles (fr_u[c])
    );
    pipelined_bench #(.NCYC(150), .INV_PS(P_INV[c]), .STOP_PS(P_STOP[c]),
                      .RUN_RISE_PS(P_RISE[c]), .RUN_FALL_PS(P_FALL[c]),
                      .STAGE_PS(P_STAGE[c]), .PRECHARGE_PS(P_PRE[c])) u_pipe (
      .done (done_p[c]), .started (started_p[c]), .checks (ck_p[c]), .failures (fl_p[c]),
      .stalls (st_p[c]), .free_cycles (fr_p[c])
    );
  end

  function automatic bit close(input int unsigned model, input int unsigned measured);
    return (model * 1000 <= measured * 1005) && (model * 1005 >= measured * 1000);
  endfunction

  task automatic need(input string what, input int c, input int unsigned n);
    checks++;
    if (n == 0) begin failures++; $display("corner %0d: never saw %s", c, what); end
  endtask

  initial begin
    for (int c = 0; c < 4; c++) begin
      checks += 3;
      if (!close(2 * (17 * B_INV[c] + B_STOP[c]), T_BASIC[c])) begin failures++; $display("corner %0d basic period", c); end
      if (!close(2 * (17 * U_INV[c] + U_STOP[c]), T_BUF[c]))   begin failures++; $display("corner %0d buffered period", c); end
      if (!close(2 * (17 * P_INV[c] + P_STOP[c]), T_PIPE[c]))  begin failures++; $display("corner %0d pipelined period", c); end
    end
    for (int c = 0; c < 4; c++) begin
      wait (done_b[c] && done_u[c] && done_p[c]);
    end
    for (int c = 0; c < 4; c++) begin
      checks   += ck_b[c] + ck_u[c] + ck_p[c];
      failures += fl_b[c] + fl_u[c] + fl_p[c];
      need("a stall (basic)", c, st_b[c]);         need("a free cycle (basic)", c, fr_b[c]);
      need("a stall (buffered)", c, st_u[c]);      need("a free cycle (buffered)", c, fr_u[c]);
      need("a stall (pipelined)", c, st_p[c]);     need("a free cycle (pipelined)", c, fr_p[c]);
      $display("corner %0d: basic %0d/%0d  buffered %0d/%0d  pipelined %0d/%0d (stalled/free)",
               c, st_b[c], fr_b[c], st_u[c], fr_u[c], st_p[c], fr_p[c]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
