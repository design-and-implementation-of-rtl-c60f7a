// blender: final mix of the two estimates (Eq. 3) and the output register.
//
// y7 = (1 - w_temp) * y_spatial + w_temp * y_temp, computed with a single
// multiplier as y_spatial + w_temp * (y_temp - y_spatial), then rounded to
// the nearest integer pixel value and limited to the pixel range. The
// multiplier is an unsigned Wallace tree (wallace_mult) applied to the
// magnitude of the difference; the sign is restored afterwards.
//
// Schedule: in phase 2 of the interval after the window was complete
// (cycle 42 of an iteration) y_spatial, y_temp and w_temp of the same
// iteration are all valid; the product is formed and registered. The result
// is then carried through two interval registers and loaded into y_out at the
// end of cycle 62, so it is on the output bus in cycle 63, the output slot of
// the source design's 64-cycle schedule (and for the following 7 cycles).
// Rounding and clamping are this design's own choices.
module blender
  import deint_pkg::*;
(
  input  logic   clk,
  input  phase_t ph,
  input  yfix_t  y_spatial,
  input  yfix_t  y_temp,
  input  wtemp_t w_temp,
  output pix_t   y_out
);

  localparam int unsigned FB = WF + YF;   // fraction bits of the product sum

  logic signed [PIX_W+YF:0]      diff;   // y_temp - y_spatial
  logic signed [PIX_W+YF+WF+2:0] mix;    // y_spatial*2^WF + w*diff
  logic        [PIX_W:0]         y_rnd;
  pix_t                          y_c, y_b, y_d1, y_d2;

  logic [PIX_W+YF-1:0]    mag;     // |y_temp - y_spatial|
  logic [PIX_W+YF+WF:0]   wmag;    // w_temp * mag

  wallace_mult #(.AW(PIX_W + YF), .BW(WF + 1)) u_mul (.a(mag), .b(w_temp), .p(wmag));

  always_comb begin
    diff  = $signed({1'b0, y_temp}) - $signed({1'b0, y_spatial});
    mag   = (y_temp >= y_spatial) ? (y_temp - y_spatial) : (y_spatial - y_temp);
    mix   = $signed({3'b000, y_spatial, WF'(0)})
          + (diff[PIX_W+YF] ? -$signed({2'b00, wmag}) : $signed({2'b00, wmag}));
    y_rnd = (PIX_W + 1)'((32'(mix) + (32'sd1 <<< (FB - 1))) >>> FB);
    y_c   = y_rnd[PIX_W] ? '1 : y_rnd[PIX_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (ph == 3'd2) y_b  <= y_c;
    if (ph == 3'd0) y_d1 <= y_b;
    if (ph == 3'd0) y_d2 <= y_d1;
    if (ph == 3'd6) y_out <= y_d2;
  end

endmodule
