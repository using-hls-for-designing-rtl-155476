// tb_top: end-to-end run of the flow engine at a reduced size (32x16 image,
// 3 levels, 2 pixels per clock, 3 cores, 2/4/8 iterations per level) with
// random stalls and back-pressure.  The level schedule gives one fully
// pipelined level and two partial ones with a bypassed core.
module tb_top;
  of_bench #(.WIDTH(32), .HEIGHT(16), .LVL(3), .PAR(2), .NCORES(3), .IT0(2), .ITF(2),
             .INTERP(0), .STALL(1)) bench ();
endmodule
