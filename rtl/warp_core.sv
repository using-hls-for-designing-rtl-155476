// warp_core: motion compensation of I2 by the initial velocity of a level.
//
// For every pixel (x, y) of the level it outputs
//   I2rec(x, y) = I2(x + u0, y + v0)
// interpolated bilinearly (INTERP = 0, 2x2 neighbourhood) or bicubically
// (INTERP = 1, 4x4 neighbourhood), together with the pixel's I1 and its
// initial velocity (u0, v0), as an hs_pix_t with zero residual velocity.
//
// The velocity is split into an integer part (floor) that selects the
// neighbourhood and a fraction that weights it.  To stream one group of PAR
// pixels per clock, every pixel that any output of the group can need must
// already be on chip: the core stores the last 2*D+2 rows of the level, where
// D = 2^(LVL-level) is the largest displacement handled at that level (the
// stored window grows towards the finer levels exactly as in the original design,
// and the buffer is sized once for level 0 and reused by the others).  A
// velocity beyond the window is clamped to it (|u|, |v| < D for bilinear,
// < D-1 for bicubic); samples outside the frame take the nearest frame pixel.
// The rows are addressed memories here instead of the original design's shift
// registers; floor rounding, border handling and the Catmull-Rom (a = -0.5)
// cubic kernel are this design's choices.
//
// Timing: output group g is produced when input group g + D*width/PAR +
// ceil(D/PAR) + 1 is accepted, into an output register.  After the last input
// group of a frame the core flushes on its own with in_ready low.  Valid/ready
// on both sides; `level`, `width`, `height` constant during a frame.
module warp_core
  import of_pkg::*;
#(
  parameter int PAR    = 4,
  parameter int WMAX   = 2048,
  parameter int LVL    = 3,
  parameter int INTERP = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [3:0]            level,
  input  logic [15:0]           width,
  input  logic [15:0]           height,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  warp_in_t [PAR-1:0]    in_data,
  output logic                  out_valid,
  input  logic                  out_ready,
  output hs_pix_t [PAR-1:0]     out_data
);

  localparam int DMAX = 1 << LVL;
  localparam int RMAX = 2 * DMAX + 2;

  warp_in_t mem [RMAX][WMAX];

  logic [31:0] d, dg, wg, npix, lat, total, step_cnt;
  logic [15:0] in_x, ox, oy;
  logic [7:0]  in_slot, o_slot;

  assign d     = 32'd1 << (LVL - int'(level));
  assign dg    = (d + PAR - 1) / PAR;
  assign wg    = 32'(width) / PAR;
  assign npix  = wg * 32'(height);
  assign lat   = d * wg + dg + 1;
  assign total = npix + lat;

  logic in_phase, slot_free, step;
  assign in_phase  = step_cnt < npix;
  assign slot_free = !out_valid || out_ready;
  assign in_ready  = in_phase && slot_free;
  assign step      = slot_free && (in_phase ? in_valid : 1'b1);

  // Read one stored pixel of frame row ry, column rx (both already in frame).
  function automatic warp_in_t rd(input int rx, input int ry, input int oyy, input int oslot);
    int s;
    s = oslot + (ry - oyy);
    if (s < 0) s += RMAX;
    if (s >= RMAX) s -= RMAX;
    return mem[s][rx];
  endfunction

  function automatic int clampi(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic fx_t lerp(input fx_t a, input fx_t b, input fx_t f);
    return a + fx_mul(f, b - a);
  endfunction

  // Catmull-Rom weights for taps -1, 0, 1, 2 at fraction f.
  function automatic fx_t cub_w(input fx_t f, input int tap);
    fx_t f2, f3;
    f2 = fx_mul(f, f);
    f3 = fx_mul(f2, f);
    case (tap)
      0:       return (-f3 + 2 * f2 - f) >>> 1;
      1:       return (3 * f3 - 5 * f2 + 2 * FX_ONE) >>> 1;
      2:       return (-3 * f3 + 4 * f2 + f) >>> 1;
      default: return (f3 - f2) >>> 1;
    endcase
  endfunction

  hs_pix_t [PAR-1:0] res;

  always_comb begin
    for (int p = 0; p < PAR; p++) begin
      warp_in_t ctr;
      fx_t uc, vc, fu, fv, lo, hi, acc, rowv;
      int x, iu, iv, wi, he, di;
      x   = int'(ox) * PAR + p;
      wi  = int'(width) - 1;
      he  = int'(height) - 1;
      di  = int'(d);
      ctr = rd(x, int'(oy), int'(oy), int'(o_slot));
      if (INTERP == 0) begin
        lo = fx_t'(-di) <<< FRAC;
        hi = (fx_t'(di) <<< FRAC) - 1;
      end else begin
        lo = fx_t'(1 - di) <<< FRAC;
        hi = (fx_t'(di - 1) <<< FRAC) - 1;
      end
      uc = (ctr.u < lo) ? lo : (ctr.u > hi) ? hi : ctr.u;
      vc = (ctr.v < lo) ? lo : (ctr.v > hi) ? hi : ctr.v;
      iu = int'(uc >>> FRAC);
      iv = int'(vc >>> FRAC);
      fu = uc & (FX_ONE - 1);
      fv = vc & (FX_ONE - 1);
      if (INTERP == 0) begin
        fx_t t, b;
        t = lerp(rd(clampi(x + iu,     0, wi), clampi(int'(oy) + iv, 0, he), int'(oy), int'(o_slot)).i2,
                 rd(clampi(x + iu + 1, 0, wi), clampi(int'(oy) + iv, 0, he), int'(oy), int'(o_slot)).i2, fu);
        b = lerp(rd(clampi(x + iu,     0, wi), clampi(int'(oy) + iv + 1, 0, he), int'(oy), int'(o_slot)).i2,
                 rd(clampi(x + iu + 1, 0, wi), clampi(int'(oy) + iv + 1, 0, he), int'(oy), int'(o_slot)).i2, fu);
        acc = lerp(t, b, fv);
      end else begin
        acc = '0;
        for (int j = 0; j < 4; j++) begin
          rowv = '0;
          for (int k = 0; k < 4; k++)
            rowv += fx_mul(cub_w(fu, k),
                           rd(clampi(x + iu + k - 1, 0, wi), clampi(int'(oy) + iv + j - 1, 0, he),
                              int'(oy), int'(o_slot)).i2);
          acc += fx_mul(cub_w(fv, j), rowv);
        end
      end
      res[p].u0  = ctr.u;
      res[p].v0  = ctr.v;
      res[p].i1  = ctr.i1;
      res[p].i2r = acc;
      res[p].du  = '0;
      res[p].dv  = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (step && in_phase)
      for (int p = 0; p < PAR; p++) mem[in_slot][int'(in_x) * PAR + p] <= in_data[p];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_cnt  <= '0;
      in_x      <= '0;
      in_slot   <= '0;
      ox        <= '0;
      oy        <= '0;
      o_slot    <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (step) begin
      if (32'(in_x) == wg - 1) begin
        in_x    <= '0;
        in_slot <= (in_slot == 8'(RMAX - 1)) ? '0 : in_slot + 8'd1;
      end else begin
        in_x <= in_x + 16'd1;
      end
      if (step_cnt >= lat) begin
        out_valid <= 1'b1;
        out_data  <= res;
        if (32'(ox) == wg - 1) begin
          ox     <= '0;
          oy     <= oy + 16'd1;
          o_slot <= (o_slot == 8'(RMAX - 1)) ? '0 : o_slot + 8'd1;
        end else begin
          ox <= ox + 16'd1;
        end
      end else begin
        out_valid <= 1'b0;
      end
      if (step_cnt == total - 1) begin
        step_cnt <= '0;
        in_x     <= '0;
        in_slot  <= '0;
        ox       <= '0;
        oy       <= '0;
        o_slot   <= '0;
      end else begin
        step_cnt <= step_cnt + 32'd1;
      end
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

endmodule
