// tb_hs_core: one Horn-Schunck iteration over whole frames, 2 pixels per
// beat: a 16x8 frame, an 8x4 frame (same delay line, shorter rows) and a
// bypassed 16x8 frame, with random gaps and back-pressure, compared pixel by
// pixel with the reference iteration.  A last 16x8 frame without stalls
// checks the rate: one group per clock plus the width/PAR + 1 group fill.
module tb_hs_core;
  import of_pkg::*;
  import of_ref_pkg::*;
  localparam int PAR = 2, WMAX = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] width, height;
  fx_t alpha2;
  logic enable, in_valid, in_ready, out_valid, out_ready;
  hs_pix_t [PAR-1:0] in_data, out_data;

  hs_core #(.PAR(PAR), .WMAX(WMAX)) dut (.*);

  int checks = 0, failures = 0;
  int n_in, i_in, n_out;
  bit stall;
  frame_t u0, v0, i1, i2, du, dv, eu, ev;

  always @(posedge clk) begin
    if (!rst_n) begin in_valid <= 0; out_ready <= 0; end
    else begin
      if (!in_valid || in_ready) begin
        if (i_in < n_in && !(stall && $urandom % 4 == 0)) begin
          for (int p = 0; p < PAR; p++) begin
            int k;
            k = i_in * PAR + p;
            in_data[p] <= '{u0: u0[k], v0: v0[k], i1: i1[k], i2r: i2[k], du: du[k], dv: dv[k]};
          end
          in_valid <= 1; i_in <= i_in + 1;
        end else in_valid <= 0;
      end
      out_ready <= !(stall && $urandom % 3 == 0);
      if (out_valid && out_ready) begin
        for (int p = 0; p < PAR; p++) begin
          int k;
          k = n_out * PAR + p;
          checks++;
          if (out_data[p].du !== eu[k] || out_data[p].dv !== ev[k] || out_data[p].u0 !== u0[k] ||
              out_data[p].i1 !== i1[k] || out_data[p].i2r !== i2[k]) begin
            failures++;
            if (failures < 5) $display("FAIL pixel %0d: du %0d/%0d", k, out_data[p].du, eu[k]);
          end
        end
        n_out <= n_out + 1;
      end
    end
  end

  task automatic frame(input int w, input int h, input bit en, input bit st);
    int t0, t1;
    u0 = new[w*h]; v0 = new[w*h]; i1 = new[w*h]; i2 = new[w*h]; du = new[w*h]; dv = new[w*h];
    foreach (u0[k]) begin
      u0[k] = fx_t'($urandom % 400000); v0[k] = -fx_t'($urandom % 400000);
      i1[k] = fx_t'($urandom % 65536);  i2[k] = fx_t'($urandom % 65536);
      du[k] = fx_t'(int'($urandom % 131072) - 65536);
      dv[k] = fx_t'(int'($urandom % 131072) - 65536);
    end
    eu = du; ev = dv;
    if (en) hs_iter(i1, i2, eu, ev, w, h, alpha2);
    width = 16'(w); height = 16'(h); enable = en; stall = st;
    @(posedge clk);
    t0 = $time;
    n_out = 0; i_in = 0; n_in = w * h / PAR;
    wait (n_out == n_in);
    t1 = $time;
    if (!st) begin
      int cyc, lim;
      cyc = (t1 - t0) / 10;
      lim = n_in + w / PAR + 1 + 4;
      checks++;
      $display("unstalled frame %0dx%0d: %0d cycles for %0d groups (limit %0d)", w, h, cyc, n_in, lim);
      if (cyc > lim) begin failures++; $display("FAIL rate: %0d cycles > %0d", cyc, lim); end
    end
    @(posedge clk);
  endtask

  initial begin
    n_in = 0; i_in = 0; n_out = 0; alpha2 = 32'sd6554; enable = 1; stall = 1;
    width = 16; height = 8;
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(16, 8, 1, 1);
    frame(8, 4, 1, 1);
    frame(16, 8, 0, 1);
    frame(16, 8, 1, 0);
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
