// tb_wl_4lvl_bilinear: the fastest 4-level configuration at full size:
// 2048x2048 images, iterations 40/20/10/5, 5 cores at 4 pixels per clock
// (passes P8, P4, P2, F), bilinear warp.  No stalls; every level is compared
// with the reference and the cycle count is checked.
module tb_wl_4lvl_bilinear;
  of_bench #(.WIDTH(2048), .HEIGHT(2048), .LVL(4), .PAR(4), .NCORES(5), .IT0(5), .ITF(2),
             .INTERP(0), .STALL(0), .SX(5.5), .SY(-3.25), .WATCHDOG(8000000)) bench ();

  // Backstop in case the bench's own watchdog cannot end the run.
  initial begin
    #(10 * 8000000 + 1000);
    $display("FAIL run did not end");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
