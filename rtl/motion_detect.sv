// motion_detect: motion detector producing the temporal weight w_temp.
//
// Decides how far the temporal estimate can be trusted. Following the source
// design's refined rule,
//   w_temp = max(1 - (|x7f - x7p| + delta) / (2*d_min + 1), 0),
// a temporal difference (plus delta) is compared with the smallest spatial
// directional difference d_min from the spatial interpolator: little change
// over time relative to the spatial detail gives w_temp near 1 (temporal
// interpolation), much change gives 0 (spatial interpolation).
//
// The source defines delta only as a quantity built from differences between
// x4, x10 and x1p, x13p, x1f, x13f that is small when the temporal estimate is
// reliable. This design compares each current-field neighbour of x7 with the
// pixel beyond it in both other fields and keeps the better side:
//   A = |x4 - x1p| + |x4 - x1f|,  B = |x10 - x13p| + |x10 - x13f|,
//   delta = min(A, B) / 2.
// It is large when the other fields disagree with the current field both
// above and below x7 (motion, image flow) and small for a static scene. Taking
// the better side keeps it small next to a static thin line that lies on x4's
// or x10's line, which a sum over both sides would mistake for motion.
//
// Fixed point: with D_min = 4*d_min and S = 4*|x7f - x7p| + 4*delta the ratio
// is exactly S / (2*D_min + 4); w_temp has WF = 8 fraction bits:
//   w_temp = 256 - floor(256*S / (2*D_min + 4)), or 0 when that is negative.
//
// Resources and schedule (phases of the interval in which `win` is complete,
// cycle 32 + phase of an iteration): one absolute-difference unit forms
// |x7f - x7p| in phase 1, A in phases 2..3 and B in phases 4..5; in phase 6 a
// comparator picks min(A, B) and the divider, with d_min4
// (registered by the spatial interpolator in phase 4) and registers w_temp,
// which stays valid until phase 6 of the next interval (cycles 39..46 of the
// iteration). The phase assignment is this design's own.
module motion_detect
  import deint_pkg::*;
(
  input  logic   clk,
  input  phase_t ph,
  input  win_t   win,
  input  dsum_t  d_min4,   // 4*d_min from the spatial interpolator
  output wtemp_t w_temp
);

  localparam int unsigned NW = 20;
  localparam int unsigned DW = 12;

  pix_t       dt_q;        // |x7f - x7p|
  logic [8:0] a_q, b_q;    // A (line above), B (line below)
  logic [10:0] s_c;        // S = 4*|x7f - x7p| + 2*min(A, B)

  assign s_c = 11'({dt_q, 2'b00}) + 11'({((a_q < b_q) ? a_q : b_q), 1'b0});

  logic [NW-1:0] div_n, div_q;
  logic [DW-1:0] div_d, div_r;

  assign div_n = NW'({s_c, WF'(0)});
  assign div_d = DW'({d_min4, 1'b0}) + DW'(4);

  divider #(.NW(NW), .DW(DW)) u_div (
    .n(div_n), .d(div_d), .q(div_q), .r(div_r)
  );

  // The single absolute-difference unit, operands chosen by phase.
  pix_t a, b, ad;
  always_comb begin
    unique case (ph)
      3'd2:    begin a = win.top[2]; b = win.x1p;  end  // x4  - x1p
      3'd3:    begin a = win.top[2]; b = win.x1f;  end  // x4  - x1f
      3'd4:    begin a = win.bot[2]; b = win.x13p; end  // x10 - x13p
      3'd5:    begin a = win.bot[2]; b = win.x13f; end  // x10 - x13f
      default: begin a = win.x7f;    b = win.x7p;  end  // x7f - x7p
    endcase
    ad = absdiff(a, b);
  end

  always_ff @(posedge clk) begin
    unique case (ph)
      3'd1: dt_q <= ad;
      3'd2: a_q  <= 9'(ad);
      3'd3: a_q  <= a_q + 9'(ad);
      3'd4: b_q  <= 9'(ad);
      3'd5: b_q  <= b_q + 9'(ad);
      default: ;
    endcase
    if (ph == 3'd6) w_temp <= (div_q >= NW'(1 << WF)) ? '0 : wtemp_t'(NW'(1 << WF) - div_q);
  end

endmodule
