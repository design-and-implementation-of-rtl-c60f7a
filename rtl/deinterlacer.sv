// deinterlacer: non-motion-compensated deinterlacer core, one missing pixel
// per 8-cycle initiation interval.
//
// For every pixel of a missing line the core forms an edge-directed spatial
// estimate (spatial_interp) and a temporal estimate from the previous and the
// next field (temporal_interp), and mixes them with a weight from the motion
// detector (motion_detect, blender). The operators are reused across the 8
// cycles of the initiation interval, so a single new iteration starts every 8
// cycles and finishes 64 cycles after its first input sample. Three
// Wallace-tree multipliers, three dividers and seven absolute-difference
// units do all the products, quotients and differences, which is the operator
// count of the source design's schedule. The interval, the latency and the
// four input buses follow that design. The phase assignment, the word widths
// and the handshake are this design's own. The 8-cycle interval at a clock
// under 12 ns fits the 96.4 ns sample period of 720x576 video at 50 fields per
// second.
//
// Interface (deint_ctrl, deint_window give the details):
//   ph           current phase 0..7; the host drives the buses by it.
//   h_valid,     phase 0: one sample of the line above (h_top) and below
//   h_top, h_bot (h_bot) the missing line, left to right.
//   v_prev,      phases 2, 4, 6 of the same interval: x1, x7, x13 of the
//   v_next       previous and next field, for the column two samples ahead of
//                the horizontal buses (the column of x4 of the iteration that
//                starts now).
//   y_out,       y_valid is high for one cycle, 63 cycles after the phase-0
//   y_valid      cycle that presented the iteration's x2; y_out then holds the
//                reconstructed pixel x7 (it is held for 8 cycles).
// Line and frame boundaries, line buffers and field memories are outside the
// core: the host supplies the neighbourhood (e.g. by replicating edge pixels).
module deinterlacer
  import deint_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   h_valid,
  input  pix_t   h_top,
  input  pix_t   h_bot,
  input  pix_t   v_prev,
  input  pix_t   v_next,
  output phase_t ph,
  output pix_t   y_out,
  output logic   y_valid
);

  win_t   win;
  dsum_t  d_min4;
  yfix_t  y_spatial, y_temp;
  wtemp_t w_temp;

  deint_ctrl u_ctrl (
    .clk, .rst_n, .h_valid, .ph, .y_valid
  );

  deint_window u_win (
    .clk, .ph, .h_top, .h_bot, .v_prev, .v_next, .win
  );

  spatial_interp u_spat (
    .clk, .ph, .win, .d_min4, .y_spatial
  );

  temporal_interp u_temp (
    .clk, .ph, .win, .y_temp
  );

  motion_detect u_mot (
    .clk, .ph, .win, .d_min4, .w_temp
  );

  blender u_blend (
    .clk, .ph, .y_spatial, .y_temp, .w_temp, .y_out
  );

endmodule
