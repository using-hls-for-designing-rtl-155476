// sum_core: final velocity of a level, (u,v)_final = (u,v)_init + (du,dv).
//
// Adds, for each of the PAR pixels of a beat, the residual velocity produced
// by the Horn-Schunck chain to the initial (up-scaled) velocity carried along
// with the pixel.  It sits in the same pixel stream as the other cores, so the
// sum needs no extra memory pass.  Combinational, valid/ready passed through.
module sum_core
  import of_pkg::*;
#(
  parameter int PAR = 4
) (
  input  logic               in_valid,
  output logic               in_ready,
  input  hs_pix_t [PAR-1:0]  in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output vel_t [PAR-1:0]     out_data
);

  assign out_valid = in_valid;
  assign in_ready  = out_ready;

  always_comb
    for (int p = 0; p < PAR; p++) begin
      out_data[p].u = in_data[p].u0 + in_data[p].du;
      out_data[p].v = in_data[p].v0 + in_data[p].dv;
    end

endmodule
