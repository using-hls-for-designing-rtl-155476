// tb_of_ctrl: job schedule of a 3-level pyramid with 5 cores and iterations
// 5, 10, 20 (levels 0, 1, 2) on an 8x8 image, 1 pixel per beat.  The bench
// answers each job with the completion events the datapath would give
// (down_done, residual beats, final beats, at random times) and checks the
// sequence: two pyramid jobs, then level 2 in 4 passes (P^4), level 1 in 2
// (P^2) and level 0 in one fully pipelined pass (F), each with the right
// first/last/coarse flags and core count; then `done`.  A second run with 7
// iterations at level 0 checks the partial last pass (5 then 2 cores).
module tb_of_ctrl;
  import of_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, down_done, delta_beat, flow_beat, job_start, busy, done [2];
  logic job_start2, busy2;
  job_t job, job2;
  logic start2, down_done2, delta_beat2, flow_beat2;

  of_ctrl #(.WIDTH(8), .HEIGHT(8), .LVL(3), .PAR(1), .NCORES(5), .IT0(5), .ITF(2)) dut (
    .clk, .rst_n, .start, .down_done, .delta_beat, .flow_beat, .job, .job_start, .busy,
    .done(done[0]));
  of_ctrl #(.WIDTH(8), .HEIGHT(8), .LVL(1), .PAR(1), .NCORES(5), .IT0(7), .ITF(2)) dut2 (
    .clk, .rst_n, .start(start2), .down_done(down_done2), .delta_beat(delta_beat2),
    .flow_beat(flow_beat2), .job(job2), .job_start(job_start2), .busy(busy2), .done(done[1]));

  int checks = 0, failures = 0;
  int n_done = 0;
  always @(posedge clk) if (done[0]) n_done <= n_done + 1;

  typedef struct { job_kind_e k; int l, p, np, nc; bit f, la, c; } exp_t;

  task automatic expect_job(input job_t j, input exp_t e, input int idx);
    checks++;
    if (j.kind != e.k || int'(j.level) != e.l || (e.k == JOB_FLOW &&
        (int'(j.pass) != e.p || int'(j.npasses) != e.np || int'(j.ncores) != e.nc ||
         j.first != e.f || j.last != e.la || j.coarse != e.c))) begin
      failures++;
      $display("FAIL job %0d: kind %0d level %0d pass %0d/%0d cores %0d f%0d l%0d c%0d", idx,
               j.kind, j.level, j.pass, j.npasses, j.ncores, j.first, j.last, j.coarse);
    end
  endtask

  // Answer one job of dut: wait, then give the events that complete it.
  task automatic serve(input int beats_needed);
    if (job.kind == JOB_DOWN) begin
      repeat ($urandom % 10 + 1) @(posedge clk);
      down_done <= 1; @(posedge clk); down_done <= 0;
    end else begin
      int n = 0;
      while (n < beats_needed) begin
        bit b = ($urandom % 2);
        if (job.last) flow_beat <= b; else delta_beat <= b;
        @(posedge clk);
        if (b) n++;
      end
      flow_beat <= 0; delta_beat <= 0;
    end
  endtask

  initial begin
    exp_t seq [9];
    seq[0] = '{JOB_DOWN, 0, 0, 0, 0, 0, 0, 0};
    seq[1] = '{JOB_DOWN, 1, 0, 0, 0, 0, 0, 0};
    seq[2] = '{JOB_FLOW, 2, 0, 4, 5, 1, 0, 0};
    seq[3] = '{JOB_FLOW, 2, 1, 4, 5, 0, 0, 0};
    seq[4] = '{JOB_FLOW, 2, 2, 4, 5, 0, 0, 0};
    seq[5] = '{JOB_FLOW, 2, 3, 4, 5, 0, 1, 0};
    seq[6] = '{JOB_FLOW, 1, 0, 2, 5, 1, 0, 1};
    seq[7] = '{JOB_FLOW, 1, 1, 2, 5, 0, 1, 1};
    seq[8] = '{JOB_FLOW, 0, 0, 1, 5, 1, 1, 1};
    start = 0; down_done = 0; delta_beat = 0; flow_beat = 0;
    start2 = 0; down_done2 = 0; delta_beat2 = 0; flow_beat2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    for (int i = 0; i < 9; i++) begin
      @(posedge clk iff job_start);
      expect_job(job, seq[i], i);
      serve((8 >> job.level) * (8 >> job.level));
    end
    repeat (3) @(posedge clk);
    checks++;
    if (busy || job_start) begin failures++; $display("FAIL not idle after the schedule"); end
    checks++;
    if (n_done != 1) begin failures++; $display("FAIL done pulsed %0d times", n_done); end

    // second controller: single level, 7 iterations -> 5 + 2 cores
    start2 <= 1; @(posedge clk); start2 <= 0;
    @(posedge clk iff job_start2);
    expect_job(job2, '{JOB_FLOW, 0, 0, 2, 5, 1, 0, 0}, 10);
    repeat (64) begin delta_beat2 <= 1; @(posedge clk); end
    delta_beat2 <= 0;
    @(posedge clk iff job_start2);
    expect_job(job2, '{JOB_FLOW, 0, 1, 2, 2, 0, 1, 0}, 11);
    repeat (64) begin flow_beat2 <= 1; @(posedge clk); end
    flow_beat2 <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (busy2) begin failures++; $display("FAIL second controller still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
