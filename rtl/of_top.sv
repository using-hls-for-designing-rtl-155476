// of_top: hierarchical (pyramid) Horn-Schunck optical flow engine.
//
// Given two images I1, I2 (WIDTH x HEIGHT) in external memory, it computes the
// dense velocity field (u, v) from I1 to I2 over an LVL-level pyramid:
//   * pyramid build (JOB_DOWN): downsample_core turns level l of both images
//     into level l+1 (Gaussian 5x5, decimation by 2);
//   * per level, coarsest first (JOB_FLOW): the coarse final velocity is
//     up-scaled (upscale_core), I2 is warped by it (warp_core), a chain of
//     NCORES Horn-Schunck cores (hs_core, one iteration each) refines the
//     residual (du, dv), and sum_core adds it to the initial velocity.  All of
//     this is one pixel stream, PAR pixels per clock, with no memory round
//     trip between the stages.  Levels needing more than NCORES iterations run
//     several passes through the chain (partial pipeline mode), storing the
//     residual in external memory between passes; the others run one pass
//     (fully pipelined mode).  of_ctrl sequences the jobs.
//
// External memory is outside this module.  Its streams are ports, all
// valid/ready, PAR pixels per beat, raster order, frame size of the current
// job's level (WIDTH >> level by HEIGHT >> level):
//   img_in    I1/I2 of `job.level` (JOB_DOWN and every JOB_FLOW pass)
//   pyr_out   I1/I2 of level `job.level`+1 (JOB_DOWN)
//   coarse_in final (u,v) of level `job.level`+1, at its own size (JOB_FLOW
//             when job.coarse)
//   delta_in  residual of the previous pass (JOB_FLOW when !job.first)
//   delta_out residual after this pass (JOB_FLOW when !job.last)
//   flow_out  final (u,v) of `job.level` (JOB_FLOW when job.last)
// `job_start` pulses when a job begins; memory must serve only the streams of
// the current job.  `alpha2` is the smoothing weight alpha^2 in Q16.16.
module of_top
  import of_pkg::*;
#(
  parameter int WIDTH  = 2048,
  parameter int HEIGHT = 2048,
  parameter int LVL    = 3,
  parameter int PAR    = 4,
  parameter int NCORES = 5,
  parameter int IT0    = 5,
  parameter int ITF    = 2,
  parameter int INTERP = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  fx_t                alpha2,
  output logic               busy,
  output logic               done,
  output job_t               job,
  output logic               job_start,

  input  logic               img_in_valid,
  output logic               img_in_ready,
  input  img_t [PAR-1:0]     img_in_data,

  output logic               pyr_out_valid,
  input  logic               pyr_out_ready,
  output img_t [PAR-1:0]     pyr_out_data,

  input  logic               coarse_in_valid,
  output logic               coarse_in_ready,
  input  vel_t [PAR-1:0]     coarse_in_data,

  input  logic               delta_in_valid,
  output logic               delta_in_ready,
  input  vel_t [PAR-1:0]     delta_in_data,

  output logic               delta_out_valid,
  input  logic               delta_out_ready,
  output vel_t [PAR-1:0]     delta_out_data,

  output logic               flow_out_valid,
  input  logic               flow_out_ready,
  output vel_t [PAR-1:0]     flow_out_data
);

  logic [15:0] width_l, height_l;
  logic        is_down, is_flow;

  assign width_l  = 16'(WIDTH >> job.level);
  assign height_l = 16'(HEIGHT >> job.level);
  assign is_down  = (job.kind == JOB_DOWN);
  assign is_flow  = (job.kind == JOB_FLOW);

  // ---------------------------------------------------------------- control
  logic down_done, delta_beat, flow_beat;

  of_ctrl #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .LVL(LVL), .PAR(PAR),
            .NCORES(NCORES), .IT0(IT0), .ITF(ITF)) u_ctrl (
    .clk, .rst_n, .start, .down_done, .delta_beat, .flow_beat,
    .job, .job_start, .busy, .done
  );

  // ------------------------------------------------------------ down-sampling
  logic ds_in_ready;

  downsample_core #(.PAR(PAR), .WMAX(WIDTH)) u_down (
    .clk, .rst_n, .width(width_l), .height(height_l),
    .in_valid(is_down && img_in_valid), .in_ready(ds_in_ready), .in_data(img_in_data),
    .out_valid(pyr_out_valid), .out_ready(pyr_out_ready), .out_data(pyr_out_data),
    .frame_done(down_done)
  );

  // ---------------------------------------------------------------- up-scaling
  logic           up_valid, up_ready;
  vel_t [PAR-1:0] up_data;

  upscale_core #(.PAR(PAR), .WMAX(WIDTH)) u_up (
    .clk, .rst_n, .width(width_l), .height(height_l),
    .coarse(job.coarse), .run(is_flow), .frame_start(job_start && is_flow),
    .in_valid(coarse_in_valid), .in_ready(coarse_in_ready), .in_data(coarse_in_data),
    .out_valid(up_valid), .out_ready(up_ready), .out_data(up_data)
  );

  // ------------------------------------------------------------------- warping
  logic               wp_in_valid, wp_in_ready, wp_out_valid, wp_out_ready;
  warp_in_t [PAR-1:0] wp_in_data;
  hs_pix_t  [PAR-1:0] wp_out_data;

  assign wp_in_valid  = is_flow && img_in_valid && up_valid;
  assign up_ready     = is_flow && img_in_valid && wp_in_ready;
  assign img_in_ready = is_down ? ds_in_ready : (is_flow && up_valid && wp_in_ready);

  always_comb
    for (int p = 0; p < PAR; p++) begin
      wp_in_data[p].i1 = img_in_data[p].i1;
      wp_in_data[p].i2 = img_in_data[p].i2;
      wp_in_data[p].u  = up_data[p].u;
      wp_in_data[p].v  = up_data[p].v;
    end

  warp_core #(.PAR(PAR), .WMAX(WIDTH), .LVL(LVL), .INTERP(INTERP)) u_warp (
    .clk, .rst_n, .level(job.level), .width(width_l), .height(height_l),
    .in_valid(wp_in_valid), .in_ready(wp_in_ready), .in_data(wp_in_data),
    .out_valid(wp_out_valid), .out_ready(wp_out_ready), .out_data(wp_out_data)
  );

  // ------------------------------------------- residual join and core chain
  logic              c_valid [NCORES+1];
  logic              c_ready [NCORES+1];
  hs_pix_t [PAR-1:0] c_data  [NCORES+1];

  assign c_valid[0]     = wp_out_valid && (job.first || delta_in_valid);
  assign wp_out_ready   = c_ready[0] && (job.first || delta_in_valid);
  assign delta_in_ready = is_flow && !job.first && wp_out_valid && c_ready[0];

  always_comb begin
    c_data[0] = wp_out_data;
    for (int p = 0; p < PAR; p++) begin
      c_data[0][p].du = job.first ? '0 : delta_in_data[p].u;
      c_data[0][p].dv = job.first ? '0 : delta_in_data[p].v;
    end
  end

  for (genvar k = 0; k < NCORES; k++) begin : g_core
    hs_core #(.PAR(PAR), .WMAX(WIDTH)) u_hs (
      .clk, .rst_n, .width(width_l), .height(height_l), .alpha2,
      .enable(8'(k) < job.ncores),
      .in_valid(c_valid[k]), .in_ready(c_ready[k]), .in_data(c_data[k]),
      .out_valid(c_valid[k+1]), .out_ready(c_ready[k+1]), .out_data(c_data[k+1])
    );
  end

  // ---------------------------------------------------------- sum and outputs
  logic sum_in_ready;

  sum_core #(.PAR(PAR)) u_sum (
    .in_valid(c_valid[NCORES] && job.last && is_flow), .in_ready(sum_in_ready), .in_data(c_data[NCORES]),
    .out_valid(flow_out_valid), .out_ready(flow_out_ready), .out_data(flow_out_data)
  );

  assign c_ready[NCORES]  = job.last ? sum_in_ready : delta_out_ready;
  assign delta_out_valid  = c_valid[NCORES] && !job.last && is_flow;
  always_comb
    for (int p = 0; p < PAR; p++) begin
      delta_out_data[p].u = c_data[NCORES][p].du;
      delta_out_data[p].v = c_data[NCORES][p].dv;
    end

  assign delta_beat = delta_out_valid && delta_out_ready;
  assign flow_beat  = flow_out_valid && flow_out_ready;

endmodule
