// downsample_core: builds the next (coarser) pyramid level of both images.
//
// Each image is filtered with the separable 5x5 Gaussian kernel
// [1 4 6 4 1]^T [1 4 6 4 1] / 256 and decimated by two in both directions:
// out(x, y) = G * in (2x, 2y).  Input frames are width x height pairs (I1, I2)
// in raster order, PAR pixels per beat; output frames are width/2 x height/2,
// PAR pixels per beat.  A win_gen delay line (4 rows, R = 2) supplies the 5x5
// neighbourhoods with border replication; only even rows and columns are
// filtered, and the results are packed into output groups of PAR pixels.
// The 5x5 Gaussian is the original design's; its binomial coefficients, border
// replication and the packing are this design's choices.
//
// Timing: the delay line flushes 2*width/PAR + ceil(2/PAR) groups after each
// frame with in_ready low.  `frame_done` pulses when the last window of a
// frame has been used.  (width/2) must be a multiple of PAR.
module downsample_core
  import of_pkg::*;
#(
  parameter int PAR  = 4,
  parameter int WMAX = 2048
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [15:0]        width,
  input  logic [15:0]        height,
  input  logic               in_valid,
  output logic               in_ready,
  input  img_t [PAR-1:0]     in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output img_t [PAR-1:0]     out_data,
  output logic               frame_done
);

  localparam int PW = $bits(img_t);
  localparam int KW [5] = '{1, 4, 6, 4, 1};

  logic [4:0][PAR+3:0][PW-1:0] win;
  logic [15:0] wx, wy;
  logic        wvalid, wready, wlast;

  win_gen #(.PIX_W(PW), .PAR(PAR), .WMAX(WMAX), .R(2)) u_dlin (
    .clk, .rst_n, .width, .height,
    .in_valid, .in_ready, .in_data,
    .out_valid(wvalid), .out_ready(wready), .out_win(win),
    .out_x(wx), .out_y(wy), .out_last(wlast)
  );

  function automatic fx_t gauss(input logic [4:0][PAR+3:0][PW-1:0] w, input int c0, input bit sel2);
    logic signed [63:0] acc;
    img_t px;
    acc = '0;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++) begin
        px = img_t'(w[r][c0 + c]);
        acc += 64'(KW[r] * KW[c]) * 64'(sel2 ? px.i2 : px.i1);
      end
    return fx_t'(acc >>> 8);
  endfunction

  img_t [PAR-1:0] acc_q;

  assign wready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_data   <= '0;
      acc_q      <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (wvalid && wready) begin
        img_t [PAR-1:0] nxt;
        logic emit;
        nxt  = acc_q;
        emit = 1'b0;
        frame_done <= wlast;
        if (!wy[0]) begin
          for (int p = 0; p < PAR; p++) begin
            int x, ol;
            x  = int'(wx) * PAR + p;
            ol = (x / 2) % PAR;
            if (x % 2 == 0) begin
              nxt[ol].i1 = gauss(win, p, 1'b0);
              nxt[ol].i2 = gauss(win, p, 1'b1);
              if (ol == PAR - 1) emit = 1'b1;
            end
          end
        end
        acc_q <= nxt;
        if (emit) begin
          out_valid <= 1'b1;
          out_data  <= nxt;
        end
      end
    end
  end

endmodule
