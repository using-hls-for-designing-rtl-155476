// tb_win_gen: windows of a 5x5 delay line (R = 2, 2 pixels per beat) over two
// frames of different row length (16x6 then 8x4, the buffer reused at a
// smaller level).  Pixels carry their own coordinates, so every window entry
// is checked against the border-replicated position it must hold.  Random
// input gaps and output back-pressure; the flush must deliver every window.
module tb_win_gen;
  localparam int PAR = 2, R = 2, PW = 16, WMAX = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] width, height;
  logic in_valid, in_ready, out_valid, out_ready, out_last;
  logic [PAR-1:0][PW-1:0] in_data;
  logic [2*R:0][PAR+2*R-1:0][PW-1:0] out_win;
  logic [15:0] out_x, out_y;

  win_gen #(.PIX_W(PW), .PAR(PAR), .WMAX(WMAX), .R(R)) dut (.*);

  int checks = 0, failures = 0;
  int n_in, i_in, n_out, lasts;

  function automatic int cl(input int v, input int hi);
    return v < 0 ? 0 : v > hi ? hi : v;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin in_valid <= 0; out_ready <= 0; end
    else begin
      if (!in_valid || in_ready) begin
        if (i_in < n_in && ($urandom % 4 != 0)) begin
          for (int p = 0; p < PAR; p++) begin
            int x, y;
            x = (i_in * PAR + p) % int'(width);
            y = (i_in * PAR + p) / int'(width);
            in_data[p] <= 16'(y * 256 + x);
          end
          in_valid <= 1; i_in <= i_in + 1;
        end else in_valid <= 0;
      end
      out_ready <= ($urandom % 3 != 0);
      if (out_valid && out_ready) begin
        int bad = 0;
        int ex, ey;
        ex = n_out % (int'(width) / PAR);
        ey = n_out / (int'(width) / PAR);
        if (int'(out_x) != ex || int'(out_y) != ey) bad++;
        for (int r = 0; r <= 2*R; r++)
          for (int c = 0; c < PAR + 2*R; c++) begin
            int px, py;
            px = cl(ex * PAR + c - R, int'(width) - 1);
            py = cl(ey + r - R, int'(height) - 1);
            if (out_win[r][c] != 16'(py * 256 + px)) bad++;
          end
        checks++;
        if (bad) begin
          failures++;
          if (failures < 5) $display("FAIL window %0d (%0d,%0d): %0d wrong entries", n_out, ex, ey, bad);
        end
        if (out_last) lasts++;
        n_out <= n_out + 1;
      end
    end
  end

  task automatic frame(input int w, input int h);
    width = 16'(w); height = 16'(h);
    n_out = 0; i_in = 0; n_in = w * h / PAR;
    wait (n_out == n_in);
    @(posedge clk);
    checks++;
    if (lasts != 1) begin failures++; $display("FAIL out_last seen %0d times", lasts); end
    lasts = 0;
  endtask

  initial begin
    n_in = 0; i_in = 0; n_out = 0; lasts = 0; width = 16; height = 6;
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(16, 6);
    frame(8, 4);
    frame(16, 6);
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
