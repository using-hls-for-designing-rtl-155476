// of_pkg: types, constants and arithmetic helpers shared by the hierarchical
// Horn-Schunck optical flow engine.
//
// Every value (pixel intensity, velocity, derivative) is a WL = 32 bit two's
// complement fixed-point word with FRAC = 16 fraction bits (Q16.16).  The
// word length matches the 32-bit words of the original HLS design; the
// fixed-point format itself is this design's choice (the original design computes in
// IEEE single precision).  Products are truncated towards minus infinity
// (arithmetic right shift), quotients towards zero.
//
// Stream beats carry PAR pixels side by side; the structs below describe one
// pixel of a beat.
package of_pkg;

  parameter int WL   = 32;
  parameter int FRAC = 16;

  typedef logic signed [WL-1:0] fx_t;

  localparam fx_t FX_ONE = fx_t'(1) <<< FRAC;

  // One pixel of the two input images.
  typedef struct packed {
    fx_t i1;
    fx_t i2;
  } img_t;

  // One velocity vector (u horizontal, v vertical, in pixels of its level).
  typedef struct packed {
    fx_t u;
    fx_t v;
  } vel_t;

  // Warp core input: both images and the initial velocity of the level.
  typedef struct packed {
    fx_t i1;
    fx_t i2;
    fx_t u;
    fx_t v;
  } warp_in_t;

  // Pixel travelling through the Horn-Schunck chain: initial velocity (for the
  // final sum), first image, motion-compensated second image and the residual
  // velocity being iterated.
  typedef struct packed {
    fx_t u0;
    fx_t v0;
    fx_t i1;
    fx_t i2r;
    fx_t du;
    fx_t dv;
  } hs_pix_t;

  typedef enum logic [1:0] {
    JOB_IDLE = 2'd0,
    JOB_DOWN = 2'd1,   // build pyramid level `level+1` from level `level`
    JOB_FLOW = 2'd2    // one pass of the core chain at level `level`
  } job_kind_e;

  typedef struct packed {
    job_kind_e   kind;
    logic [3:0]  level;
    logic [7:0]  pass;     // pass index within the level
    logic [7:0]  npasses;  // passes at this level: 1 = fully pipelined (F), k > 1 = partial (P^k)
    logic [7:0]  ncores;   // cores iterating in this pass, the others are bypassed
    logic        first;    // first pass: residual starts at zero
    logic        last;     // last pass: output goes through the sum core
    logic        coarse;   // a coarser level exists and supplies (u,v)_init
  } job_t;

  // Fixed-point product, truncated.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [2*WL-1:0] p;
    p = 64'(a) * 64'(b);
    return fx_t'(p >>> FRAC);
  endfunction

  // Fixed-point quotient a/b, truncated towards zero; 0 when b is not positive.
  function automatic fx_t fx_div(input fx_t a, input fx_t b);
    logic signed [2*WL-1:0] n;
    logic signed [2*WL-1:0] q;
    if (b <= 0) return '0;
    n = 64'(a) <<< FRAC;
    q = n / 64'(b);
    return fx_t'(q);
  endfunction

endpackage
