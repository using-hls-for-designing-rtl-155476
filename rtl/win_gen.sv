// win_gen: streaming sliding-window generator, the reusable delay line of the
// pyramid cores.
//
// A frame of `height` rows of `width` pixels arrives in raster order, PAR
// pixels (one "group") per accepted beat.  The module keeps 2R line buffers
// (each row stored as groups, addressed by the group column) and a register
// window of NG = 2*ceil(R/PAR)+1 groups by 2R+1 rows.  For every input group
// it emits, R rows and ceil(R/PAR) groups later, the (2R+1) x (PAR+2R) pixel
// neighbourhood of one output group (out_x, out_y).  Neighbours outside the
// frame are replaced by the nearest frame pixel (border replication).
//
// The buffers are sized for the largest frame (WMAX) and serve every smaller
// pyramid level: only the row length `width` changes, as in the original
// HLS design where one delay line is shared by all levels.  The original builds
// the delay line from shift registers; here the rows are addressed memories
// with the same behaviour, and the border replication is this design's choice.
//
// Handshake: valid/ready on both sides.  After the last input group of a
// frame the module runs R*width/PAR + ceil(R/PAR) flush steps on its own, with
// in_ready low, to emit the remaining windows; then it waits for the next
// frame.  `width` and `height` must stay constant during a frame; width must
// be a multiple of PAR.  out_win and out_x/out_y are valid while out_valid.
module win_gen #(
  parameter int PIX_W = 32,
  parameter int PAR   = 4,
  parameter int WMAX  = 2048,
  parameter int R     = 1
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [15:0]                            width,
  input  logic [15:0]                            height,
  input  logic                                   in_valid,
  output logic                                   in_ready,
  input  logic [PAR-1:0][PIX_W-1:0]              in_data,
  output logic                                   out_valid,
  input  logic                                   out_ready,
  output logic [2*R:0][PAR+2*R-1:0][PIX_W-1:0]   out_win,
  output logic [15:0]                            out_x,
  output logic [15:0]                            out_y,
  output logic                                   out_last
);

  localparam int WG = WMAX / PAR;
  localparam int GH = (R + PAR - 1) / PAR;
  localparam int NG = 2 * GH + 1;
  localparam int NR = 2 * R + 1;

  typedef logic [PAR-1:0][PIX_W-1:0] grp_t;

  grp_t lb [2*R][WG];     // lb[k][x]: row (current - 1 - k)
  grp_t cw [NG][NR];      // cw[a][k]: group of age a, row (newest - k)

  logic [15:0] in_x, in_y, ox, oy;
  logic [31:0] step_cnt;
  logic [31:0] wg, npix, lat, total;

  assign wg    = 32'(width) / PAR;
  assign npix  = wg * 32'(height);
  assign lat   = R * wg + GH;
  assign total = npix + lat;

  logic in_phase, slot_free, step;
  assign in_phase  = step_cnt < npix;
  assign slot_free = !out_valid || out_ready;
  assign in_ready  = in_phase && slot_free;
  assign step      = slot_free && (in_phase ? in_valid : 1'b1);

  grp_t colvec [NR];
  always_comb begin
    colvec[0] = in_phase ? in_data : '0;
    for (int k = 1; k < NR; k++) colvec[k] = lb[k-1][in_x];
  end

  always_ff @(posedge clk) begin
    if (step) begin
      for (int k = 0; k < 2*R; k++) lb[k][in_x] <= colvec[k];
      for (int a = NG-1; a > 0; a--) cw[a] <= cw[a-1];
      cw[0] <= colvec;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_cnt  <= '0;
      in_x      <= '0;
      in_y      <= '0;
      ox        <= '0;
      oy        <= '0;
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      out_last  <= 1'b0;
    end else if (step) begin
      if (32'(in_x) == wg - 1) begin
        in_x <= '0;
        in_y <= in_y + 16'd1;
      end else begin
        in_x <= in_x + 16'd1;
      end
      if (step_cnt >= lat) begin
        out_valid <= 1'b1;
        out_x     <= ox;
        out_y     <= oy;
        out_last  <= (step_cnt == total - 1);
        if (32'(ox) == wg - 1) begin
          ox <= '0;
          oy <= oy + 16'd1;
        end else begin
          ox <= ox + 16'd1;
        end
      end else begin
        out_valid <= 1'b0;
        out_last  <= 1'b0;
      end
      if (step_cnt == total - 1) begin
        step_cnt <= '0;
        in_x     <= '0;
        in_y     <= '0;
        ox       <= '0;
        oy       <= '0;
      end else begin
        step_cnt <= step_cnt + 32'd1;
      end
    end else if (out_ready) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end
  end

  // Window read-out with border replication.
  always_comb begin
    for (int r = 0; r < NR; r++) begin
      for (int c = 0; c < PAR + 2*R; c++) begin
        int px, py, j, a, k, base;
        base = int'(out_x) * PAR;
        px = base + c - R;
        if (px < 0) px = 0;
        if (px > int'(width) - 1) px = int'(width) - 1;
        py = int'(out_y) + r - R;
        if (py < 0) py = 0;
        if (py > int'(height) - 1) py = int'(height) - 1;
        j = GH * PAR + (px - base);
        a = NG - 1 - j / PAR;
        k = int'(out_y) + R - py;
        out_win[r][c] = cw[a][k][j % PAR];
      end
    end
  end

endmodule
