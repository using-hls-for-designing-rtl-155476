// upscale_core: initial velocity of a level from the final velocity of the
// next coarser level,  (u,v)_init(x, y) = 2 * (u,v)_final(x/2, y/2).
//
// The coarse field (width/2 x height/2) arrives in raster order, PAR vectors
// per beat; the output is the full level (width x height), PAR vectors per
// beat.  Each coarse vector is replicated over a 2x2 block and doubled.  A
// coarse input group is accepted on even output rows for every second output
// group and kept in a one-row buffer, which supplies the odd output rows, so
// every coarse vector is read once.  The doubling and the x2 upscale are the
// original design's; nearest-neighbour replication is this design's choice.
//
// With `coarse` low (coarsest level) the output is the zero field and no input
// is read.  A frame starts after `frame_start` (one-cycle pulse) and, once all
// width*height/PAR output groups have left, the core waits for the next pulse.
// `run` low freezes it.  Output is registered; valid/ready on both sides.
module upscale_core
  import of_pkg::*;
#(
  parameter int PAR  = 4,
  parameter int WMAX = 2048
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [15:0]        width,
  input  logic [15:0]        height,
  input  logic               coarse,
  input  logic               run,
  input  logic               frame_start,
  input  logic               in_valid,
  output logic               in_ready,
  input  vel_t [PAR-1:0]     in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output vel_t [PAR-1:0]     out_data
);

  localparam int CG = (WMAX / 2 + PAR - 1) / PAR;   // coarse groups per row

  vel_t [PAR-1:0] rowbuf [CG];

  logic [15:0] ox, oy;
  logic [31:0] wg;
  logic        armed;
  logic        need_in, slot_free, step, last_grp;
  vel_t [PAR-1:0] src;

  assign wg        = 32'(width) / PAR;
  assign need_in   = coarse && !oy[0] && !ox[0];
  assign slot_free = !out_valid || out_ready;
  assign step      = run && armed && slot_free && (!need_in || in_valid);
  assign in_ready  = run && armed && slot_free && need_in;
  assign last_grp  = (32'(ox) == wg - 1) && (oy == height - 1);

  always_comb begin
    src = need_in ? in_data : rowbuf[ox >> 1];
  end

  always_ff @(posedge clk) begin
    if (step && need_in) rowbuf[ox >> 1] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ox        <= '0;
      oy        <= '0;
      armed     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (frame_start) armed <= 1'b1;
      if (step) begin
        out_valid <= 1'b1;
        for (int p = 0; p < PAR; p++) begin
          int c;
          c = (int'(ox) * PAR + p) / 2 - (int'(ox) / 2) * PAR;
          if (coarse) begin
            out_data[p].u <= src[c].u <<< 1;
            out_data[p].v <= src[c].v <<< 1;
          end else begin
            out_data[p] <= '0;
          end
        end
        if (last_grp) begin
          ox    <= '0;
          oy    <= '0;
          armed <= 1'b0;
        end else if (32'(ox) == wg - 1) begin
          ox <= '0;
          oy <= oy + 16'd1;
        end else begin
          ox <= ox + 16'd1;
        end
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
