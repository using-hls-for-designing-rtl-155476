// hs_calc: one pixel of one Horn-Schunck iteration (combinational).
//
// From the 3x3 neighbourhood of the pixel (win[1][1] is the pixel itself,
// row 2 is the row below, column 2 the column to the right) it forms
//   * the spatio-temporal derivatives Ix, Iy, It over the 2x2x2 cube made of
//     the pixel, its right, lower and lower-right neighbours in I1 and in the
//     motion-compensated I2 (mean of the four first differences, as in the
//     original Horn-Schunck method);
//   * the neighbourhood averages u_bar, v_bar of the residual velocity with the
//     Horn-Schunck weights 1/6 (edge neighbours) and 1/12 (corners);
//   * the update
//       r  = (Ix*u_bar + Iy*v_bar + It) / (alpha2 + Ix^2 + Iy^2)
//       du = u_bar - Ix*r,   dv = v_bar - Iy*r
// The update equations are the original design's; the derivative stencil, the
// averaging weights and the Q16.16 arithmetic are this design's choices.
// With `enable` low the pixel passes unchanged (bypassed core).  The initial
// velocity, I1 and warped I2 of the centre pixel are always passed on.
module hs_calc
  import of_pkg::*;
(
  input  hs_pix_t      win [3][3],
  input  fx_t          alpha2,
  input  logic         enable,
  output hs_pix_t      res
);

  localparam logic signed [63:0] AVG_K = 64'sd5461;   // round(2^16 / 12)

  fx_t ix, iy, it, ubar, vbar, num, den, ratio;

  function automatic fx_t avg3x3(input fx_t e0, input fx_t e1, input fx_t e2, input fx_t e3,
                                 input fx_t c0, input fx_t c1, input fx_t c2, input fx_t c3);
    logic signed [63:0] s;
    s = 2 * (64'(e0) + 64'(e1) + 64'(e2) + 64'(e3)) + 64'(c0) + 64'(c1) + 64'(c2) + 64'(c3);
    s = (s * AVG_K) >>> 16;
    return fx_t'(s);
  endfunction

  always_comb begin
    ix = (  (win[1][2].i1  - win[1][1].i1)  + (win[2][2].i1  - win[2][1].i1)
          + (win[1][2].i2r - win[1][1].i2r) + (win[2][2].i2r - win[2][1].i2r)) >>> 2;
    iy = (  (win[2][1].i1  - win[1][1].i1)  + (win[2][2].i1  - win[1][2].i1)
          + (win[2][1].i2r - win[1][1].i2r) + (win[2][2].i2r - win[1][2].i2r)) >>> 2;
    it = (  (win[1][1].i2r - win[1][1].i1)  + (win[1][2].i2r - win[1][2].i1)
          + (win[2][1].i2r - win[2][1].i1)  + (win[2][2].i2r - win[2][2].i1)) >>> 2;

    ubar = avg3x3(win[0][1].du, win[2][1].du, win[1][0].du, win[1][2].du,
                  win[0][0].du, win[0][2].du, win[2][0].du, win[2][2].du);
    vbar = avg3x3(win[0][1].dv, win[2][1].dv, win[1][0].dv, win[1][2].dv,
                  win[0][0].dv, win[0][2].dv, win[2][0].dv, win[2][2].dv);

    num   = fx_mul(ix, ubar) + fx_mul(iy, vbar) + it;
    den   = alpha2 + fx_mul(ix, ix) + fx_mul(iy, iy);
    ratio = fx_div(num, den);

    res = win[1][1];
    if (enable) begin
      res.du = ubar - fx_mul(ix, ratio);
      res.dv = vbar - fx_mul(iy, ratio);
    end
  end

endmodule
