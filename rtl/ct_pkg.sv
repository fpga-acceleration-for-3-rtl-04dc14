// ct_pkg: types and constants shared by the low-dose CT reconstruction
// accelerator. Number formats (all two's complement unless noted):
//   image value f      : signed 16 bit, 12 fractional bits (16-bit fixed point
//                        per the design; the split 4.12 is this design's choice)
//   edge indicator v   : unsigned 8 bit, 7 fractional bits, 1.0 = 128
//   intersection w     : unsigned 16 bit, 14 fractional bits (voxel units)
//   coordinates        : signed 32 bit, 16 fractional bits (voxel units)
//   projection g, r    : signed 32 bit, 16 fractional bits
//   step sizes         : unsigned 32 bit, 24 fractional bits
// Stencil order inside packed arrays: 0 centre, 1 east (x+1), 2 west (x-1),
// 3 south (y+1), 4 north (y-1).
package ct_pkg;

  localparam int F_W    = 16;
  localparam int F_FRAC = 12;
  localparam int V_W    = 8;
  localparam int V_FRAC = 7;
  localparam int V_ONE  = 1 << V_FRAC;
  localparam int W_W    = 16;
  localparam int W_FRAC = 14;
  localparam int X_W    = 10;   // up to 1023 voxels in x and y (874 used)
  localparam int Z_W    = 5;    // up to 31 slices in the window (24 used)
  localparam int Q      = 16;   // fractional bits of coordinates, g, r

  typedef logic signed [F_W-1:0] f_t;
  typedef logic [V_W-1:0]        v_t;
  typedef logic [W_W-1:0]        w_t;

  typedef struct packed {
    logic [Z_W-1:0] z;
    logic [X_W-1:0] y;
    logic [X_W-1:0] x;
  } vox_t;

  typedef struct packed {
    logic [4:0][F_W-1:0] f;
    logic [4:0][V_W-1:0] v;
  } stencil_t;

  // ray tracer -> prefetch
  typedef struct packed {
    vox_t vox;
    w_t   w;
    logic last;
  } trace_t;

  // prefetch -> forward projection / local ray buffer
  typedef struct packed {
    vox_t     vox;
    w_t       w;
    stencil_t st;
    logic     last;
  } fetch_t;

  // gradient descent -> write-back
  typedef struct packed {
    vox_t vox;
    f_t   f;
    v_t   v;
    logic last;
  } upd_t;

  // one beam as handed to a PE: segment end points already clipped to the
  // reconstruction window, and the measured projection value g_i
  typedef struct packed {
    logic signed [31:0] sx, sy, sz;
    logic signed [31:0] dx, dy, dz;
    logic signed [31:0] g;
  } beam_t;

  // cache request from a PE
  typedef struct packed {
    vox_t vox;
    f_t   f;
    v_t   v;
  } cache_wr_t;

  // constants of eqs. (3), (4) in 16 fractional bits:
  // alpha = 0.1, beta = 0.05 (Sec. V-B), epsilon = 1.0 voxel (assumed)
  localparam int ALPHA2_Q16    = 13107;  // 2*alpha
  localparam int BETA_2EPS_Q16 = 1638;   // beta/(2*eps)
  localparam int BETA2EPS_Q16  = 6554;   // 2*beta*eps

  // 16 stencil colours: colour = (x mod 4) + 4*(y mod 4)
  function automatic logic [3:0] color_of(input logic [X_W-1:0] x,
                                          input logic [X_W-1:0] y);
    return {y[1:0], x[1:0]};
  endfunction

endpackage
