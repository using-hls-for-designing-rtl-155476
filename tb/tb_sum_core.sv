// tb_sum_core: random beats of 4 pixels; the output vector must be the
// initial velocity plus the residual, and valid/ready must pass through.
module tb_sum_core;
  import of_pkg::*;
  localparam int PAR = 4;

  logic in_valid, in_ready, out_valid, out_ready;
  hs_pix_t [PAR-1:0] in_data;
  vel_t    [PAR-1:0] out_data;

  sum_core #(.PAR(PAR)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int t = 0; t < 200; t++) begin
      in_valid  = t[0];
      out_ready = t[1];
      for (int p = 0; p < PAR; p++) begin
        in_data[p].u0  = fx_t'($urandom);
        in_data[p].v0  = fx_t'($urandom);
        in_data[p].i1  = fx_t'($urandom);
        in_data[p].i2r = fx_t'($urandom);
        in_data[p].du  = fx_t'($urandom);
        in_data[p].dv  = fx_t'($urandom);
      end
      #1;
      checks++;
      if (out_valid !== in_valid || in_ready !== out_ready) failures++;
      for (int p = 0; p < PAR; p++) begin
        fx_t eu, ev;
        eu = fx_t'(longint'(in_data[p].u0) + longint'(in_data[p].du));
        ev = fx_t'(longint'(in_data[p].v0) + longint'(in_data[p].dv));
        checks++;
        if (out_data[p].u !== eu || out_data[p].v !== ev) begin
          failures++;
          if (failures < 5) $display("FAIL beat %0d lane %0d", t, p);
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
