// hs_core: streaming Horn-Schunck iteration core, PAR pixels per clock.
//
// One frame of hs_pix_t pixels (initial velocity, I1, warped I2 and the
// residual velocity of the previous iteration) enters in raster order; the
// same frame leaves with the residual velocity advanced by one iteration.
// A win_gen delay line (two rows of the largest level plus a 3x3 register
// window) provides each pixel's 3x3 neighbourhood and PAR hs_calc lanes
// compute the update, so one core is one iteration and cores are chained to
// run several iterations in one pass, as in the original HLS architecture.  The
// delay line is sized for the largest level and reused at every level.
//
// Interface: valid/ready streams; `width`/`height` give the current level's
// frame size.  Latency is width/PAR + 1 groups plus one register; after each
// frame the core flushes for that many cycles with in_ready low.  With
// `enable` low the core is bypassed: pixels leave with the same latency and
// their residual velocity unchanged.
module hs_core
  import of_pkg::*;
#(
  parameter int PAR  = 4,
  parameter int WMAX = 2048
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [15:0]           width,
  input  logic [15:0]           height,
  input  fx_t                   alpha2,
  input  logic                  enable,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  hs_pix_t [PAR-1:0]     in_data,
  output logic                  out_valid,
  input  logic                  out_ready,
  output hs_pix_t [PAR-1:0]     out_data
);

  localparam int PW = $bits(hs_pix_t);

  logic [2:0][PAR+1:0][PW-1:0] win;
  logic [15:0] wx, wy;
  logic        wlast;

  win_gen #(.PIX_W(PW), .PAR(PAR), .WMAX(WMAX), .R(1)) u_dlin (
    .clk, .rst_n, .width, .height,
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_win(win),
    .out_x(wx), .out_y(wy), .out_last(wlast)
  );

  for (genvar p = 0; p < PAR; p++) begin : g_lane
    hs_pix_t lw [3][3];
    always_comb
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          lw[r][c] = hs_pix_t'(win[r][p+c]);
    hs_calc u_calc (.win(lw), .alpha2, .enable, .res(out_data[p]));
  end

endmodule
