// tb_warp_core: bilinear and bicubic warp cores (2 pixels per beat, 2-level
// buffer) on a 32x16 frame at level 0 (window half size 4) and a 16x8 frame at
// level 1 (half size 2).  Random I2 and velocities up to 1.5 pixels beyond the
// window exercise the displacement clamp and the frame borders.  Outputs are
// compared with the reference warp; I1 and the initial velocity must pass
// unchanged and the residual must be zero.  Random gaps and back-pressure.
module tb_warp_core;
  import of_pkg::*;
  import of_ref_pkg::*;
  localparam int PAR = 2, WMAX = 32, LVL = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0]  level;
  logic [15:0] width, height;
  logic in_valid, out_ready;
  logic in_ready [2];
  logic out_valid [2];
  warp_in_t [PAR-1:0] in_data;
  hs_pix_t  [PAR-1:0] out_data [2];

  for (genvar m = 0; m < 2; m++) begin : g_dut
    warp_core #(.PAR(PAR), .WMAX(WMAX), .LVL(LVL), .INTERP(m)) dut (
      .clk, .rst_n, .level, .width, .height,
      .in_valid, .in_ready(in_ready[m]), .in_data,
      .out_valid(out_valid[m]), .out_ready, .out_data(out_data[m]));
  end

  int checks = 0, failures = 0;
  int n_in, i_in, n_out [2];
  frame_t i1, i2, u, v;
  frame_t ex [2];

  // Both cores see the same input stream; it advances when both accept.
  always @(posedge clk) begin
    if (!rst_n) begin in_valid <= 0; out_ready <= 0; end
    else begin
      if (!in_valid || (in_ready[0] && in_ready[1])) begin
        if (i_in < n_in && ($urandom % 4 != 0)) begin
          for (int p = 0; p < PAR; p++) begin
            int k;
            k = i_in * PAR + p;
            in_data[p] <= '{i1: i1[k], i2: i2[k], u: u[k], v: v[k]};
          end
          in_valid <= 1; i_in <= i_in + 1;
        end else in_valid <= 0;
      end
      out_ready <= ($urandom % 3 != 0);
      for (int m = 0; m < 2; m++)
        if (out_valid[m] && out_ready) begin
          for (int p = 0; p < PAR; p++) begin
            int k;
            k = n_out[m] * PAR + p;
            checks++;
            if (out_data[m][p].i2r !== ex[m][k] || out_data[m][p].i1 !== i1[k] ||
                out_data[m][p].u0 !== u[k] || out_data[m][p].v0 !== v[k] ||
                out_data[m][p].du !== 0 || out_data[m][p].dv !== 0) begin
              failures++;
              if (failures < 6) $display("FAIL interp %0d pixel %0d: %0d expected %0d", m, k,
                                         out_data[m][p].i2r, ex[m][k]);
            end
          end
          n_out[m] <= n_out[m] + 1;
        end
    end
  end

  task automatic frame(input int l);
    int w, h, d;
    w = WMAX >> l; h = 16 >> l; d = 1 << (LVL - l);
    i1 = new[w*h]; i2 = new[w*h]; u = new[w*h]; v = new[w*h];
    foreach (i1[k]) begin
      i1[k] = fx_t'($urandom % 65536);
      i2[k] = fx_t'($urandom % 65536);
      u[k]  = fx_t'(int'($urandom % (2 * (d + 2) * 65536)) - (d + 2) * 65536 + 32768);
      v[k]  = fx_t'(int'($urandom % (2 * (d + 2) * 65536)) - (d + 2) * 65536 + 32768);
    end
    ex[0] = warp(i2, u, v, w, h, d, 0);
    ex[1] = warp(i2, u, v, w, h, d, 1);
    level = 4'(l); width = 16'(w); height = 16'(h);
    @(posedge clk);
    n_out[0] = 0; n_out[1] = 0; i_in = 0; n_in = w * h / PAR;
    wait (n_out[0] == n_in && n_out[1] == n_in);
    @(posedge clk);
  endtask

  initial begin
    n_in = 0; i_in = 0; n_out[0] = 0; n_out[1] = 0; level = 0; width = 32; height = 16;
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(0);
    frame(1);
    frame(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
