// of_bench: end-to-end bench of of_top.  It models the external memory that
// holds the images, the pyramid, the residual between passes and the final
// velocity of each level, serves the streams of each job as of_top announces
// it, and at the end compares every pyramid level and every level's final
// velocity field with the behavioural reference in of_ref_pkg.
//
// The input pair is a smooth pattern and the same pattern shifted by (SX, SY)
// pixels, quantised to 8 bits.  With STALL set, sources insert random gaps and
// sinks apply random back-pressure.  It counts the mechanisms exercised
// (pyramid jobs, fully pipelined and partial passes, bypassed cores, coarse
// up-scaling, input stalls, output back-pressure) and fails any that never
// happened.  Without stalls it also checks the total cycle count against one
// group per clock plus each stage's fill latency.  USE_DEFAULTS instantiates
// of_top without any parameter override (the parameters here must then equal
// its defaults).
module of_bench
  import of_pkg::*;
  import of_ref_pkg::*;
#(
  parameter int  WIDTH        = 32,
  parameter int  HEIGHT       = 16,
  parameter int  LVL          = 3,
  parameter int  PAR          = 2,
  parameter int  NCORES       = 3,
  parameter int  IT0          = 2,
  parameter int  ITF          = 2,
  parameter int  INTERP       = 0,
  parameter bit  USE_DEFAULTS = 0,
  parameter bit  STALL        = 1,
  parameter real SX           = 2.5,
  parameter real SY           = -1.5,
  parameter int  WATCHDOG     = 200000
) ();

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam fx_t ALPHA2 = 32'sd6554;   // alpha^2 = 0.1

  logic start, busy, done, job_start;
  job_t job;
  logic img_in_valid, img_in_ready;       img_t [PAR-1:0] img_in_data;
  logic pyr_out_valid, pyr_out_ready;     img_t [PAR-1:0] pyr_out_data;
  logic coarse_in_valid, coarse_in_ready; vel_t [PAR-1:0] coarse_in_data;
  logic delta_in_valid, delta_in_ready;   vel_t [PAR-1:0] delta_in_data;
  logic delta_out_valid, delta_out_ready; vel_t [PAR-1:0] delta_out_data;
  logic flow_out_valid, flow_out_ready;   vel_t [PAR-1:0] flow_out_data;

  if (USE_DEFAULTS) begin : g_dut
    of_top dut (.*, .alpha2(ALPHA2));
  end else begin : g_dut
    of_top #(.WIDTH(WIDTH), .HEIGHT(HEIGHT), .LVL(LVL), .PAR(PAR), .NCORES(NCORES),
             .IT0(IT0), .ITF(ITF), .INTERP(INTERP)) dut (.*, .alpha2(ALPHA2));
  end

  // ------------------------------------------------------------ memory model
  frame_t im1 [LVL], im2 [LVL], fu [LVL], fv [LVL];
  frame_t dru, drv, dwu, dwv;

  int checks = 0, failures = 0;
  int n_down = 0, n_passF = 0, n_passP = 0, n_bypass = 0, n_coarse = 0;
  int n_in_stall = 0, n_backpressure = 0;
  longint cycles = 0, busy_cycles = 0, bound = 0;

  int  lvl_w, lvl_h;
  job_t cur = '0;
  logic prev_nonlast_flow = 1'b0;

  // source/sink state
  int  img_n = 0, img_i = 0, crs_n = 0, crs_i = 0, dlt_n = 0, dlt_i = 0;
  int  pyr_i = 0, dout_i = 0, fout_i = 0;

  function automatic int rnd_gap();
    return STALL ? (($urandom % 4) == 0) : 0;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      cycles <= cycles + 1;
      if (busy) busy_cycles <= busy_cycles + 1;
      if (img_in_valid && !img_in_ready) n_in_stall <= n_in_stall + 1;
      if ((flow_out_valid && !flow_out_ready) || (delta_out_valid && !delta_out_ready) ||
          (pyr_out_valid && !pyr_out_ready)) n_backpressure <= n_backpressure + 1;
    end
  end

  // Streams.  One clocked block serves the sinks, then sets up a new job,
  // then drives the sources, so the order of these steps is fixed.
  always @(posedge clk) begin
    if (!rst_n) begin
      img_in_valid <= 0; coarse_in_valid <= 0; delta_in_valid <= 0;
      pyr_out_ready <= 0; delta_out_ready <= 0; flow_out_ready <= 0;
    end else begin
      // sinks
      pyr_out_ready   <= !rnd_gap();
      delta_out_ready <= !rnd_gap();
      flow_out_ready  <= !rnd_gap();
      if (pyr_out_valid && pyr_out_ready) begin
        for (int p = 0; p < PAR; p++) begin
          im1[cur.level+1][pyr_i*PAR + p] = pyr_out_data[p].i1;
          im2[cur.level+1][pyr_i*PAR + p] = pyr_out_data[p].i2;
        end
        pyr_i++;
      end
      if (delta_out_valid && delta_out_ready) begin
        for (int p = 0; p < PAR; p++) begin
          dwu[dout_i*PAR + p] = delta_out_data[p].u;
          dwv[dout_i*PAR + p] = delta_out_data[p].v;
        end
        dout_i++;
      end
      if (flow_out_valid && flow_out_ready) begin
        for (int p = 0; p < PAR; p++) begin
          fu[cur.level][fout_i*PAR + p] = flow_out_data[p].u;
          fv[cur.level][fout_i*PAR + p] = flow_out_data[p].v;
        end
        fout_i++;
      end
      // job start
      if (job_start) begin
        cur = job;
        lvl_w = WIDTH >> job.level;
        lvl_h = HEIGHT >> job.level;
        if (prev_nonlast_flow) begin dru = dwu; drv = dwv; end
        img_n = lvl_w * lvl_h / PAR; img_i = 0;
        pyr_i = 0; dout_i = 0; fout_i = 0;
        crs_n = 0; dlt_n = 0; crs_i = 0; dlt_i = 0;
        if (job.kind == JOB_DOWN) begin
          n_down++;
          im1[job.level+1] = new[lvl_w*lvl_h/4];
          im2[job.level+1] = new[lvl_w*lvl_h/4];
          bound += img_n + 3 * (lvl_w / PAR) + 20;
        end else begin
          if (job.npasses == 1) n_passF++; else n_passP++;
          if (job.ncores < 8'(NCORES)) n_bypass++;
          if (job.coarse) begin n_coarse++; crs_n = lvl_w * lvl_h / 4 / PAR; end
          if (!job.first) dlt_n = img_n;
          if (!job.last) begin dwu = new[lvl_w*lvl_h]; dwv = new[lvl_w*lvl_h]; end
          else begin fu[job.level] = new[lvl_w*lvl_h]; fv[job.level] = new[lvl_w*lvl_h]; end
          bound += img_n + ((1 << (LVL - job.level)) + NCORES + 4) * (lvl_w / PAR) + 40;
        end
        prev_nonlast_flow = (job.kind == JOB_FLOW) && !job.last;
      end
      // sources: registered valid/data, advanced when accepted
      else begin
        if (!img_in_valid || img_in_ready) begin
          if (img_i < img_n && !rnd_gap()) begin
            for (int p = 0; p < PAR; p++) begin
              img_in_data[p].i1 <= im1[cur.level][img_i*PAR + p];
              img_in_data[p].i2 <= im2[cur.level][img_i*PAR + p];
            end
            img_in_valid <= 1; img_i++;
          end else img_in_valid <= 0;
        end
        if (!coarse_in_valid || coarse_in_ready) begin
          if (crs_i < crs_n && !rnd_gap()) begin
            for (int p = 0; p < PAR; p++) begin
              coarse_in_data[p].u <= fu[cur.level+1][crs_i*PAR + p];
              coarse_in_data[p].v <= fv[cur.level+1][crs_i*PAR + p];
            end
            coarse_in_valid <= 1; crs_i++;
          end else coarse_in_valid <= 0;
        end
        if (!delta_in_valid || delta_in_ready) begin
          if (dlt_i < dlt_n && !rnd_gap()) begin
            for (int p = 0; p < PAR; p++) begin
              delta_in_data[p].u <= dru[dlt_i*PAR + p];
              delta_in_data[p].v <= drv[dlt_i*PAR + p];
            end
            delta_in_valid <= 1; dlt_i++;
          end else delta_in_valid <= 0;
        end
      end
    end
  end

  // ---------------------------------------------------------------- checking
  function automatic int nbad(string what, const ref frame_t got, const ref frame_t exp, input int l);
    int bad = 0;
    if (got.size() != exp.size()) return 1;
    foreach (exp[i]) if (got[i] !== exp[i]) begin
      if (bad < 3) $display("  %s level %0d pixel %0d: got %0d expected %0d", what, l, i, got[i], exp[i]);
      bad++;
    end
    if (bad != 0) $display("FAIL %s level %0d: %0d mismatching pixels", what, l, bad);
    return bad;
  endfunction

  task automatic mech(string what, int n);
    checks++;
    $display("  mechanism %-22s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", what); end
  endtask

  initial begin
    frame_t r1 [LVL], r2 [LVL], ru, rv;
    real mu, mv;
    im1[0] = new[WIDTH*HEIGHT];
    im2[0] = new[WIDTH*HEIGHT];
    for (int y = 0; y < HEIGHT; y++)
      for (int x = 0; x < WIDTH; x++) begin
        real a, b;
        a = 128.0 + 60.0 * $sin(x * 0.35) * $cos(y * 0.27) + 40.0 * $sin((x + 2*y) * 0.11);
        b = 128.0 + 60.0 * $sin((x - SX) * 0.35) * $cos((y - SY) * 0.27)
                  + 40.0 * $sin(((x - SX) + 2*(y - SY)) * 0.11);
        im1[0][y*WIDTH + x] = fx_t'(int'(a)) <<< 8;
        im2[0][y*WIDTH + x] = fx_t'(int'(b)) <<< 8;
      end
    img_n = 0; crs_n = 0; dlt_n = 0; img_i = 0; crs_i = 0; dlt_i = 0;
    pyr_i = 0; dout_i = 0; fout_i = 0;
    cur = '0;
    start = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge done);
    @(posedge clk);
    $display("run finished after %0d cycles (%0d busy)", cycles, busy_cycles);

    // reference
    r1[0] = im1[0]; r2[0] = im2[0];
    for (int l = 0; l + 1 < LVL; l++) begin
      r1[l+1] = down(r1[l], WIDTH >> l, HEIGHT >> l);
      r2[l+1] = down(r2[l], WIDTH >> l, HEIGHT >> l);
      checks++; if (nbad("pyramid I1", im1[l+1], r1[l+1], l+1) != 0) failures++;
      checks++; if (nbad("pyramid I2", im2[l+1], r2[l+1], l+1) != 0) failures++;
    end
    for (int l = LVL - 1; l >= 0; l--) begin
      int w, h, it;
      frame_t u0, v0, i2r, du, dv;
      w = WIDTH >> l; h = HEIGHT >> l;
      if (l == LVL - 1) begin
        u0 = new[w*h]; v0 = new[w*h];
        foreach (u0[i]) begin u0[i] = 0; v0[i] = 0; end
      end else begin
        u0 = up(ru, w/2, h/2); v0 = up(rv, w/2, h/2);
      end
      i2r = warp(r2[l], u0, v0, w, h, 1 << (LVL - l), INTERP);
      du = new[w*h]; dv = new[w*h];
      foreach (du[i]) begin du[i] = 0; dv[i] = 0; end
      it = IT0;
      for (int k = 0; k < l; k++) it *= ITF;
      for (int k = 0; k < it; k++) hs_iter(r1[l], i2r, du, dv, w, h, ALPHA2);
      ru = new[w*h]; rv = new[w*h];
      foreach (ru[i]) begin ru[i] = u0[i] + du[i]; rv[i] = v0[i] + dv[i]; end
      checks++; if (nbad("flow u", fu[l], ru, l) != 0) failures++;
      checks++; if (nbad("flow v", fv[l], rv, l) != 0) failures++;
    end
    mu = 0; mv = 0;
    foreach (ru[i]) begin mu += real'(ru[i]) / 65536.0; mv += real'(rv[i]) / 65536.0; end
    $display("mean velocity at level 0: u=%f v=%f (pattern shift %f, %f)",
             mu / (WIDTH*HEIGHT), mv / (WIDTH*HEIGHT), SX, SY);

    mech("pyramid jobs", n_down);
    mech("fully pipelined passes", n_passF);
    mech("partial passes", n_passP);
    mech("coarse up-scaling", n_coarse);
    // a core is bypassed only when a level's iterations are not a multiple of NCORES
    begin
      bit partial_pass = 0;
      for (int l = 0, it = IT0; l < LVL; l++, it *= ITF) if (it % NCORES != 0) partial_pass = 1;
      if (partial_pass) mech("bypassed cores", n_bypass);
    end
    if (STALL) begin
      mech("input stalls", n_in_stall);
      mech("output back-pressure", n_backpressure);
    end else begin
      checks++;
      $display("  busy cycles %0d, bound %0d", busy_cycles, bound);
      if (busy_cycles > bound) begin
        failures++;
        $display("FAIL throughput: %0d cycles above the bound %0d", busy_cycles, bound);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * WATCHDOG);
    failures++;
    $display("FAIL watchdog: run not finished after %0d cycles", WATCHDOG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
