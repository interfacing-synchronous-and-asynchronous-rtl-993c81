// gsla_tb_pkg: functions shared by the testbenches.
//
// async_fn is the function the modelled asynchronous datapath computes and
// sync_fn the function of the synchronous logic placed between two
// asynchronous stages; both are arbitrary, chosen so that a stale,
// precharged (all-zero) or early-sampled value is detected. async_len gives
// the data-dependent length, in domino buffers, of one computation.
package gsla_tb_pkg;
  timeunit 1ps; timeprecision 1ps;
  function automatic logic [31:0] async_fn(input logic [31:0] x);
    return {x[30:0], x[31]} ^ 32'h5A3C_96E1;
  endfunction

  function automatic logic [31:0] sync_fn(input logic [31:0] x);
    return x + 32'd7;
  endfunction

  function automatic int unsigned async_len(input logic [31:0] x,
                                            input int unsigned min_stages,
                                            input int unsigned spread);
    return min_stages + (x[7:0] % (spread + 1));
  endfunction
endpackage
