// tb_upscale_core: 16x8 output frames from 8x4 coarse fields (2 vectors per
// beat): every output vector must be twice the coarse vector at (x/2, y/2)
// and every coarse vector must be read exactly once.  A frame with `coarse`
// low must give the zero field without reading input, and the core must not
// start a frame before `frame_start`.  Random gaps and back-pressure.
module tb_upscale_core;
  import of_pkg::*;
  import of_ref_pkg::*;
  localparam int PAR = 2, WMAX = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] width, height;
  logic coarse, run, frame_start, in_valid, in_ready, out_valid, out_ready;
  vel_t [PAR-1:0] in_data, out_data;

  upscale_core #(.PAR(PAR), .WMAX(WMAX)) dut (.*);

  int checks = 0, failures = 0;
  int n_in, i_in, n_out, n_exp;
  frame_t cu, cv, eu, ev;

  always @(posedge clk) begin
    if (!rst_n) begin in_valid <= 0; out_ready <= 0; end
    else begin
      if (!in_valid || in_ready) begin
        if (i_in < n_in && ($urandom % 4 != 0)) begin
          for (int p = 0; p < PAR; p++) begin
            in_data[p].u <= cu[i_in * PAR + p];
            in_data[p].v <= cv[i_in * PAR + p];
          end
          in_valid <= 1; i_in <= i_in + 1;
        end else in_valid <= 0;
      end
      out_ready <= ($urandom % 3 != 0);
      if (out_valid && out_ready) begin
        for (int p = 0; p < PAR; p++) begin
          int k;
          k = n_out * PAR + p;
          checks++;
          if (n_out >= n_exp || out_data[p].u !== eu[k] || out_data[p].v !== ev[k]) begin
            failures++;
            if (failures < 5) $display("FAIL vector %0d: %0d expected %0d", k, out_data[p].u, eu[k]);
          end
        end
        n_out <= n_out + 1;
      end
    end
  end

  task automatic frame(input bit c);
    int w, h;
    w = 16; h = 8;
    cu = new[w*h/4]; cv = new[w*h/4];
    foreach (cu[k]) begin
      cu[k] = fx_t'(int'($urandom % 600000) - 300000);
      cv[k] = fx_t'(int'($urandom % 600000) - 300000);
    end
    if (c) begin eu = up(cu, w/2, h/2); ev = up(cv, w/2, h/2); end
    else begin
      eu = new[w*h]; ev = new[w*h];
      foreach (eu[k]) begin eu[k] = 0; ev[k] = 0; end
    end
    coarse = c; width = 16'(w); height = 16'(h);
    n_out = 0; i_in = 0; n_in = c ? w * h / 4 / PAR : 0; n_exp = w * h / PAR;
    repeat (20) @(posedge clk);
    checks++;
    if (n_out != 0) begin failures++; $display("FAIL output before frame_start"); end
    frame_start <= 1;
    @(posedge clk);
    frame_start <= 0;
    wait (n_out == n_exp);
    repeat (20) @(posedge clk);
    checks++;
    if (n_out != n_exp || i_in != n_in || in_valid) begin
      failures++;
      $display("FAIL frame end: %0d outputs, %0d inputs read of %0d", n_out, i_in, n_in);
    end
  endtask

  initial begin
    n_in = 0; i_in = 0; n_out = 0; n_exp = 0; coarse = 1; run = 1; frame_start = 0;
    width = 16; height = 8;
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(1);
    frame(0);
    frame(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
