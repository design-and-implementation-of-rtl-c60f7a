// deint_pkg: types, widths and schedule constants shared by the deinterlacer.
//
// The deinterlacer rebuilds a missing line pixel x7 from a cross-shaped
// neighbourhood: five pixels on the line above (x2..x6) and below (x8..x12)
// in the current field, and the pixels x1, x7, x13 of the same column in the
// previous and the next field. One reconstruction is one pipeline
// "iteration"; a new iteration starts every II = 8 clock cycles and takes
// LATENCY = 64 cycles from its first input sample to its output, as in the
// design this core follows. The pixel width (8 bits) and the fixed-point
// formats below are this design's own choices.
package deint_pkg;

  localparam int unsigned PIX_W   = 8;   // pixel width (luma)
  localparam int unsigned II      = 8;   // initiation interval, cycles
  localparam int unsigned LATENCY = 64;  // first input to output, cycles
  localparam int unsigned WF      = 8;   // fraction bits of all weights
  localparam int unsigned YF      = 4;   // fraction bits of y_spatial / y_temp

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [2:0]       phase_t;     // cycle within the initiation interval

  // Interpolator output: unsigned, YF fraction bits.
  typedef logic [PIX_W+YF-1:0] yfix_t;

  // Motion weight w_temp in [0, 1], WF fraction bits (1.0 = 2**WF).
  typedef logic [WF:0] wtemp_t;

  // Sum of three weighted spatial differences |a|+2|b|+|c| = 4*d_theta.
  typedef logic [PIX_W+1:0] dsum_t;

  // The pixel neighbourhood of one iteration (names follow the pixel map).
  typedef struct packed {
    pix_t [4:0] top;   // top[0] = x2 ... top[4] = x6
    pix_t [4:0] bot;   // bot[0] = x8 ... bot[4] = x12
    pix_t x1p, x7p, x13p;  // previous field
    pix_t x1f, x7f, x13f;  // next field
  } win_t;

  function automatic pix_t absdiff(pix_t a, pix_t b);
    return (a > b) ? pix_t'(a - b) : pix_t'(b - a);
  endfunction

endpackage
