// tb_wl_4lvl_bicubic: the 4-level bicubic configuration at full size:
// 2048x2048 images, iterations 40/20/10/5, 5 cores at 1 pixel per clock
// (passes P8, P4, P2, F), bicubic warp with a 16-pixel window at level 0.
// No stalls; every level is compared with the reference and the cycle count
// is checked against one pixel per clock plus the fill latencies.
module tb_wl_4lvl_bicubic;
  of_bench #(.WIDTH(2048), .HEIGHT(2048), .LVL(4), .PAR(1), .NCORES(5), .IT0(5), .ITF(2),
             .INTERP(1), .STALL(0), .SX(5.5), .SY(-3.25), .WATCHDOG(20000000)) bench ();

  // Backstop in case the bench's own watchdog cannot end the run.
  initial begin
    #(10 * 20000000 + 1000);
    $display("FAIL run did not end");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
