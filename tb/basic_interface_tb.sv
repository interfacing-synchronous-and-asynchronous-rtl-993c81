// basic_interface_tb: runs the basic interface controller with two domino
// datapath modules, unbuffered (ring of 19 gates, period 8.23 ns) and
// buffered (clock tree in the ring, RUN through its own tree, period
// 7.95 ns). The scoreboards check every value passed through the
// asynchronous modules and the time of every clock edge; stalled and
// free-running cycles must both occur in each configuration.
module basic_interface_tb;
  timeunit 1ps; timeprecision 1ps;

  logic        done_u, done_b;
  int unsigned ck_u, fl_u, st_u, fr_u, ck_b, fl_b, st_b, fr_b;
  int unsigned checks, failures;

  basic_bench #(.BUFFERED(1'b0)) u_unbuf (
    .done (done_u), .checks (ck_u), .failures (fl_u), .stalls (st_u), .free_cycles (fr_u)
  );
  basic_bench #(.BUFFERED(1'b1)) u_buf (
    .done (done_b), .checks (ck_b), .failures (fl_b), .stalls (st_b), .free_cycles (fr_b)
  );

  initial begin
    wait (done_u && done_b);
    checks   = ck_u + ck_b + 4;
    failures = fl_u + fl_b;
    if (st_u == 0) begin failures++; $display("no stall (unbuffered)"); end
    if (fr_u == 0) begin failures++; $display("no free-running cycle (unbuffered)"); end
    if (st_b == 0) begin failures++; $display("no stall (buffered)"); end
    if (fr_b == 0) begin failures++; $display("no free-running cycle (buffered)"); end
    $display("unbuffered: stalls=%0d free=%0d  buffered: stalls=%0d free=%0d", st_u, fr_u, st_b, fr_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", ck_u + ck_b, fl_u + fl_b + 1);
    $finish;
  end
endmodule
