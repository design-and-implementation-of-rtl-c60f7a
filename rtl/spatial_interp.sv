// spatial_interp: edge-directed spatial interpolator (y7,spatial).
//
// Follows the source algorithm: for the 45, 90 and 135 degree directions it
// forms the mean of the two pixels facing each other across x7 and a weighted
// difference d = (|a| + 2|b| + |c|) / 4 over three parallel pixel pairs. Each
// direction gets the weight w = (d_max - d + 1) / (d - d_min + 1), and the
// output is the weight-normalised sum of the three means (Eq. 1).
//
// Fixed point (this design's choice): differences are kept as D = 4d, so the
// weights are computed exactly as (D_max - D + 4) / (D - D_min + 4), with
// WF = 8 fraction bits; means are kept as pixel sums M = 2m. The output has
// YF = 4 fraction bits and is truncated: y = floor(8 * sum(w*M) / sum(w)).
//
// Resources and schedule: like the source design, the block reuses its
// operators in different cycles of the 8-cycle initiation interval. It has
// three absolute-difference units, one divider and one multiplier
// (a Wallace tree, wallace_mult). Phases are
// those of the interval in which `win` is complete (phase p = cycle 32 + p of
// an iteration):
//   phase 1..3  absolute differences of the 45, 90, 135 degree pairs -> D;
//               phase 1 also registers the means M
//   phase 4..6  divider: weights w45, w90, w135 (D_max, D_min from the D
//               registers); phase 4 also registers d_min4 (valid phases 5..4)
//   phase 5..7  multiplier: accumulate sum(w*M) and sum(w)
//   phase 1 of the next interval: divider forms y_spatial (valid from
//   phase 2 for 8 cycles, cycles 42..49 of the iteration).
// The divider's phase-1 use belongs to the previous iteration and its phase
// 4..6 uses to the current one, so both share it without conflict; which
// operation sits in which phase is this design's own assignment.
module spatial_interp
  import deint_pkg::*;
(
  input  logic   clk,
  input  phase_t ph,
  input  win_t   win,
  output dsum_t  d_min4,     // 4*d_min, phases 5..7 and 0..4 of next interval
  output yfix_t  y_spatial   // from phase 2 of the next interval
);

  localparam int unsigned QW = 17;          // weight width, max 2**16
  localparam int unsigned NW = 32;          // divider dividend width
  localparam int unsigned DW = 20;          // divider divisor width

  dsum_t          dd [3];    // 0: 45, 1: 90, 2: 135
  logic [8:0]     mm [3];
  logic [QW-1:0]  w  [3];
  logic [27:0]    acc_n;     // sum(w*M)
  logic [18:0]    acc_w;     // sum(w)

  logic [NW-1:0] div_n, div_q;
  logic [DW-1:0] div_d, div_r;

  divider #(.NW(NW), .DW(DW)) u_div (
    .n(div_n), .d(div_d), .q(div_q), .r(div_r)
  );

  // Absolute-difference units: direction k pairs top[j+2-k] with bot[j+k],
  // j = 0..2 (k = 0: x4/x8, x5/x9, x6/x10; k = 2: x2/x10, x3/x11, x4/x12).
  logic [1:0] asel;
  pix_t       ad [3];
  dsum_t      dsum_c;
  assign asel = (ph == 3'd2) ? 2'd1 : (ph == 3'd3) ? 2'd2 : 2'd0;
  always_comb begin
    for (int j = 0; j < 3; j++)
      ad[j] = absdiff(win.top[j + 2 - int'(asel)], win.bot[j + int'(asel)]);
    dsum_c = dsum_t'(ad[0]) + dsum_t'({ad[1], 1'b0}) + dsum_t'(ad[2]);
  end

  // Min/max of the three differences.
  dsum_t dmax, dmin;
  always_comb begin
    dmax = dd[0];
    dmin = dd[0];
    for (int k = 1; k < 3; k++) begin
      if (dd[k] > dmax) dmax = dd[k];
      if (dd[k] < dmin) dmin = dd[k];
    end
  end

  // Divider operand selection by phase.
  logic [1:0]  wsel;
  logic [10:0] wnum, wden;
  assign wsel = (ph == 3'd5) ? 2'd1 : (ph == 3'd6) ? 2'd2 : 2'd0;
  assign wnum = 11'(dmax) - 11'(dd[wsel]) + 11'd4;
  assign wden = 11'(dd[wsel]) - 11'(dmin) + 11'd4;
  always_comb begin
    if (ph == 3'd1) begin
      div_n = NW'({acc_n, 3'b000});
      div_d = DW'(acc_w);
    end else begin
      div_n = NW'({wnum, WF'(0)});
      div_d = DW'(wden);
    end
  end

  // Multiplier: one product per phase 5..7.
  logic [1:0]  msel;
  logic [25:0] prod;
  assign msel = (ph == 3'd6) ? 2'd1 : (ph == 3'd7) ? 2'd2 : 2'd0;
  wallace_mult #(.AW(QW), .BW(9)) u_mul (.a(w[msel]), .b(mm[msel]), .p(prod));

  always_ff @(posedge clk) begin
    unique case (ph)
      3'd1: begin
        y_spatial <= yfix_t'(div_q);
        dd[0] <= dsum_c;
        mm[0] <= 9'(win.top[3]) + 9'(win.bot[1]);   // x5 + x9
        mm[1] <= 9'(win.top[2]) + 9'(win.bot[2]);   // x4 + x10
        mm[2] <= 9'(win.top[1]) + 9'(win.bot[3]);   // x3 + x11
      end
      3'd2: dd[1] <= dsum_c;
      3'd3: dd[2] <= dsum_c;
      3'd4: begin
        w[0]   <= QW'(div_q);
        d_min4 <= dmin;
      end
      3'd5: begin
        w[1]  <= QW'(div_q);
        acc_n <= 28'(prod);
        acc_w <= 19'(w[0]);
      end
      3'd6: begin
        w[2]  <= QW'(div_q);
        acc_n <= acc_n + 28'(prod);
        acc_w <= acc_w + 19'(w[1]);
      end
      3'd7: begin
        acc_n <= acc_n + 28'(prod);
        acc_w <= acc_w + 19'(w[2]);
      end
      default: ;
    endcase
  end

endmodule
