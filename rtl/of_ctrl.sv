// of_ctrl: job sequencer of the hierarchical flow engine.
//
// After `start` it runs
//   1. pyramid construction: one JOB_DOWN per level 0 .. LVL-2, each building
//      level l+1 of both images from level l; finished when the downsample
//      core reports its last window (`down_done`);
//   2. the flow levels from the coarsest (LVL-1) down to 0.  Level l needs
//      IT0 * ITF^l Horn-Schunck iterations; with NCORES cores chained, it runs
//      npasses = ceil(iterations / NCORES) passes (one pass: fully pipelined
//      mode F; several: partial mode P^npasses, residuals kept in memory
//      between passes).  In the last pass of a level fewer cores may be
//      needed; `job.ncores` tells how many iterate, the rest are bypassed.
//      A pass ends when width*height/PAR beats have left on the residual
//      stream (`delta_beat`) or, in the last pass, on the final velocity stream
//      (`flow_beat`).
// The iteration schedule and the F/P modes are the original design's; the job
// encoding and the one idle cycle between jobs are this design's choices.
//
// `job` is stable during a job; `job_start` pulses in the first cycle of each
// job; `done` pulses when level 0 is finished; `busy` is high in between.
module of_ctrl
  import of_pkg::*;
#(
  parameter int WIDTH  = 2048,
  parameter int HEIGHT = 2048,
  parameter int LVL    = 3,
  parameter int PAR    = 4,
  parameter int NCORES = 5,
  parameter int IT0    = 5,
  parameter int ITF    = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        down_done,
  input  logic        delta_beat,
  input  logic        flow_beat,
  output job_t        job,
  output logic        job_start,
  output logic        busy,
  output logic        done
);

  typedef enum logic [1:0] {S_IDLE, S_GAP, S_RUN} state_e;

  state_e      state;
  logic [31:0] beats, need;
  job_t        nxt;
  logic        have_next;

  function automatic int iters(input int l);
    int n;
    n = IT0;
    for (int k = 0; k < 15; k++) if (k < l) n *= ITF;
    return n;
  endfunction

  function automatic job_t flow_job(input int l, input int p);
    job_t j;
    int it, np, rem;
    it  = iters(l);
    np  = (it + NCORES - 1) / NCORES;
    rem = it - p * NCORES;
    j.kind    = JOB_FLOW;
    j.level   = 4'(l);
    j.pass    = 8'(p);
    j.npasses = 8'(np);
    j.ncores  = 8'((rem < NCORES) ? rem : NCORES);
    j.first   = (p == 0);
    j.last    = (p == np - 1);
    j.coarse  = (l < LVL - 1);
    return j;
  endfunction

  function automatic job_t down_job(input int l);
    job_t j;
    j         = '0;
    j.kind    = JOB_DOWN;
    j.level   = 4'(l);
    return j;
  endfunction

  // Job that follows the current one.
  always_comb begin
    nxt       = '0;
    have_next = 1'b1;
    if (job.kind == JOB_DOWN) begin
      if (int'(job.level) + 1 < LVL - 1) nxt = down_job(int'(job.level) + 1);
      else                               nxt = flow_job(LVL - 1, 0);
    end else if (!job.last) begin
      nxt = flow_job(int'(job.level), int'(job.pass) + 1);
    end else if (job.level != 0) begin
      nxt = flow_job(int'(job.level) - 1, 0);
    end else begin
      have_next = 1'b0;
    end
  end

  assign need = (32'(WIDTH) >> job.level) * (32'(HEIGHT) >> job.level) / PAR;
  assign busy = (state != S_IDLE);

  logic finished;
  always_comb begin
    finished = 1'b0;
    if (state == S_RUN) begin
      if (job.kind == JOB_DOWN) finished = down_done;
      else finished = (job.last ? flow_beat : delta_beat) && (beats == need - 1);
    end
  end

  job_t pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      job       <= '0;
      pend      <= '0;
      beats     <= '0;
      job_start <= 1'b0;
      done      <= 1'b0;
    end else begin
      job_start <= 1'b0;
      done      <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          pend  <= (LVL > 1) ? down_job(0) : flow_job(0, 0);
          state <= S_GAP;
        end
        S_GAP: begin
          job       <= pend;
          beats     <= '0;
          job_start <= 1'b1;
          state     <= S_RUN;
        end
        default: begin
          if (job.kind == JOB_FLOW && (job.last ? flow_beat : delta_beat))
            beats <= beats + 32'd1;
          if (finished) begin
            pend     <= nxt;
            job.kind <= JOB_IDLE;
            if (have_next) begin
              state <= S_GAP;
            end else begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
      endcase
    end
  end

endmodule
