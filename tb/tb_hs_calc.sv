// tb_hs_calc: random 3x3 neighbourhoods through one Horn-Schunck update,
// compared with the reference iteration applied to the same 3x3 frame (its
// centre pixel needs no border handling).  Also checks the bypass (enable low)
// and the pass-through of the initial velocity, I1 and warped I2.
module tb_hs_calc;
  import of_pkg::*;
  import of_ref_pkg::*;

  hs_pix_t win [3][3];
  fx_t     alpha2;
  logic    enable;
  hs_pix_t res;

  hs_calc dut (.*);

  int checks = 0, failures = 0;

  function automatic fx_t rv(input int range_q16);
    return fx_t'(int'($urandom % (2 * range_q16 + 1)) - range_q16);
  endfunction

  initial begin
    for (int t = 0; t < 400; t++) begin
      frame_t i1, i2, du, dv;
      i1 = new[9]; i2 = new[9]; du = new[9]; dv = new[9];
      alpha2 = fx_t'(($urandom % 30000) + 1000);
      enable = (t % 5 != 4);
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          win[r][c].u0  = rv(500000);
          win[r][c].v0  = rv(500000);
          win[r][c].i1  = fx_t'($urandom % 65536);
          win[r][c].i2r = fx_t'($urandom % 65536);
          win[r][c].du  = rv(200000);
          win[r][c].dv  = rv(200000);
          i1[r*3+c] = win[r][c].i1;  i2[r*3+c] = win[r][c].i2r;
          du[r*3+c] = win[r][c].du;  dv[r*3+c] = win[r][c].dv;
        end
      #1;
      begin
        fx_t eu, ev;
        eu = win[1][1].du; ev = win[1][1].dv;
        if (enable) begin
          hs_iter(i1, i2, du, dv, 3, 3, alpha2);
          eu = du[4]; ev = dv[4];
        end
        checks++;
        if (res.du !== eu || res.dv !== ev || res.u0 !== win[1][1].u0 || res.v0 !== win[1][1].v0 ||
            res.i1 !== win[1][1].i1 || res.i2r !== win[1][1].i2r) begin
          failures++;
          if (failures < 5) $display("FAIL case %0d: du %0d/%0d dv %0d/%0d", t, res.du, eu, res.dv, ev);
        end
      end
    end
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
