// temporal_interp: temporal interpolator (y7,temp, Eq. 2).
//
// Forms a weighted mean of x7 in the previous field (x7p) and in the next
// field (x7f): y = (wp*x7p + wf*x7f) / (wp + wf). The source design states
// that the two weights come from differences between x7p or x7f and the six
// nearest current-field pixels x3, x4, x5, x9, x10, x11, computed "similarly"
// to the spatial weights, but does not print them. This design therefore uses
// the spatial rule on two candidates: with D = sum of the six absolute
// differences (6 times their mean d),
//   w = (D_max - D + 6) / (D - D_min + 6),  D_max/D_min over {Dp, Df},
// so the candidate that matches its surroundings better gets the larger
// weight, and equal matches give equal weights.
//
// Fixed point: weights have WF = 8 fraction bits, the output YF = 4 fraction
// bits, truncated: y = floor(16 * (wp*x7p + wf*x7f) / (wp + wf)).
//
// Resources and schedule (phases of the interval in which `win` is complete,
// cycle 32 + phase of an iteration): three absolute-difference units, one
// divider and one multiplier (a Wallace tree, wallace_mult), reused across
// phases.
//   phase 1, 2  |x7p - x3,x4,x5|, then |x7p - x9,x10,x11| -> Dp
//               (phase 1 also registers x7p, x7f)
//   phase 3, 4  the same for x7f -> Df
//   phase 5, 6  divider: wp, wf
//   phase 7, 0  multiplier: wp*x7p, then wf*x7f (phase 0 of the next
//               interval), accumulating numerator and weight sum
//   phase 1 of the next interval: divider forms y_temp (valid from phase 2 of
//   that interval for 8 cycles, cycles 42..49 of the iteration).
// The phase assignment is this design's own.
module temporal_interp
  import deint_pkg::*;
(
  input  logic   clk,
  input  phase_t ph,
  input  win_t   win,
  output yfix_t  y_temp
);

  localparam int unsigned NW = 30;
  localparam int unsigned DW = 18;

  typedef logic [10:0] tsum_t;   // sum of six pixel differences, max 1530

  tsum_t       dp, df;
  pix_t        x7p, x7f;
  logic [16:0] wp, wf;
  logic [25:0] acc_n;
  logic [17:0] acc_w;

  logic [NW-1:0] div_n, div_q;
  logic [DW-1:0] div_d, div_r;

  divider #(.NW(NW), .DW(DW)) u_div (
    .n(div_n), .d(div_d), .q(div_q), .r(div_r)
  );

  // Absolute-difference units: candidate (x7p in phases 1-2, x7f in 3-4)
  // against three neighbours of one line (above in odd, below in even phases).
  pix_t       cand;
  pix_t [4:0] line;
  tsum_t      asum;
  assign cand = (ph == 3'd3 || ph == 3'd4) ? win.x7f : win.x7p;
  assign line = (ph == 3'd2 || ph == 3'd4) ? win.bot : win.top;
  assign asum = tsum_t'(absdiff(cand, line[1])) + tsum_t'(absdiff(cand, line[2]))
              + tsum_t'(absdiff(cand, line[3]));

  tsum_t tmax, tmin, dsel;
  assign tmax = (dp > df) ? dp : df;
  assign tmin = (dp > df) ? df : dp;
  assign dsel = (ph == 3'd6) ? df : dp;

  always_comb begin
    if (ph == 3'd1) begin
      div_n = NW'({acc_n, 4'b0000});
      div_d = DW'(acc_w);
    end else begin
      div_n = NW'({(tmax - dsel + tsum_t'(6)), WF'(0)});
      div_d = DW'(tsum_t'(dsel - tmin + tsum_t'(6)));
    end
  end

  logic [24:0] prod;
  wallace_mult #(.AW(17), .BW(PIX_W)) u_mul (
    .a((ph == 3'd0) ? wf : wp), .b((ph == 3'd0) ? x7f : x7p), .p(prod)
  );

  always_ff @(posedge clk) begin
    unique case (ph)
      3'd1: begin
        y_temp <= yfix_t'(div_q);
        dp  <= asum;
        x7p <= win.x7p;
        x7f <= win.x7f;
      end
      3'd2: dp <= dp + asum;
      3'd3: df <= asum;
      3'd4: df <= df + asum;
      3'd5: wp <= 17'(div_q);
      3'd6: wf <= 17'(div_q);
      3'd7: begin
        acc_n <= 26'(prod);
        acc_w <= 18'(wp);
      end
      3'd0: begin
        acc_n <= acc_n + 26'(prod);
        acc_w <= acc_w + 18'(wf);
      end
      default: ;
    endcase
  end

endmodule
