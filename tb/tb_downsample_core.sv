// tb_downsample_core: pyramid reduction of both images, 2 pixels per beat,
// 16x8 -> 8x4 and then 8x4 -> 4x2 through the same delay line, compared with
// the reference Gaussian reduction; frame_done must pulse once per frame.
// Random gaps and back-pressure.
module tb_downsample_core;
  import of_pkg::*;
  import of_ref_pkg::*;
  localparam int PAR = 2, WMAX = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] width, height;
  logic in_valid, in_ready, out_valid, out_ready, frame_done;
  img_t [PAR-1:0] in_data, out_data;

  downsample_core #(.PAR(PAR), .WMAX(WMAX)) dut (.*);

  int checks = 0, failures = 0;
  int n_in, i_in, n_out, n_done;
  frame_t a, b, ea, eb;

  always @(posedge clk) begin
    if (!rst_n) begin in_valid <= 0; out_ready <= 0; end
    else begin
      if (frame_done) n_done <= n_done + 1;
      if (!in_valid || in_ready) begin
        if (i_in < n_in && ($urandom % 4 != 0)) begin
          for (int p = 0; p < PAR; p++) begin
            in_data[p].i1 <= a[i_in * PAR + p];
            in_data[p].i2 <= b[i_in * PAR + p];
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
          if (out_data[p].i1 !== ea[k] || out_data[p].i2 !== eb[k]) begin
            failures++;
            if (failures < 5) $display("FAIL pixel %0d: %0d expected %0d", k, out_data[p].i1, ea[k]);
          end
        end
        n_out <= n_out + 1;
      end
    end
  end

  task automatic frame(input int w, input int h);
    a = new[w*h]; b = new[w*h];
    foreach (a[k]) begin a[k] = fx_t'($urandom % 65536); b[k] = fx_t'($urandom % 65536); end
    ea = down(a, w, h); eb = down(b, w, h);
    width = 16'(w); height = 16'(h);
    @(posedge clk);
    n_out = 0; i_in = 0; n_in = w * h / PAR; n_done = 0;
    wait (n_done == 1);
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != w * h / 4 / PAR || n_done != 1) begin
      failures++;
      $display("FAIL frame %0dx%0d: %0d output groups, %0d frame_done pulses", w, h, n_out, n_done);
    end
  endtask

  initial begin
    n_in = 0; i_in = 0; n_out = 0; n_done = 0; width = 16; height = 8;
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(16, 8);
    frame(8, 4);
    frame(16, 8);
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
