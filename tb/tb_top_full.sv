// tb_top_full: one complete flow computation with of_top at its default
// parameters (2048x2048 images, 3 levels, 4 pixels per clock, 5 cores,
// 20/10/5 iterations, bilinear warp), without stalls, checked against the
// reference at every level, with the cycle count checked against one group
// per clock plus the fill latency of each stage.
module tb_top_full;
  of_bench #(.WIDTH(2048), .HEIGHT(2048), .LVL(3), .PAR(4), .NCORES(5), .IT0(5), .ITF(2),
             .INTERP(0), .USE_DEFAULTS(1), .STALL(0), .WATCHDOG(6000000)) bench ();
endmodule
