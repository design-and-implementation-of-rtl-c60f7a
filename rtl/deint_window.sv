// deint_window: the four input buses and the pixel neighbourhood they build.
//
// Pixels enter on four buses, as in the source design. The two horizontal
// buses carry the current-field lines above and below the missing pixel, one
// sample per initiation interval, in phase 0. Each sample is reused by five
// overlapping iterations: it is x2 (x8) of the iteration that starts in this
// interval and x6 (x12) of the one that started four intervals earlier, so a
// 5-deep shift register per line holds x2..x6 and x8..x12.
//
// The two vertical buses carry the column x1, x7, x13 of the previous field
// (v_prev) and of the next field (v_next) at the faster rate the source design
// calls for: three values per interval, in phases 2, 4 and 6, at the start of
// the iteration (the cycles printed in the source schedule). They are held in
// a 4-deep delay line until the iteration's last horizontal sample has
// arrived.
//
// Timing: the iteration that starts in interval j sees its complete
// neighbourhood on `win` in phases 1..7 of interval j+4 (cycles 33..39 of its
// life). The vertical column belongs to x4, so the host presents it two
// samples ahead of the horizontal buses. The phase order x1, x7, x13 is this
// design's own choice.
module deint_window
  import deint_pkg::*;
(
  input  logic   clk,
  input  phase_t ph,
  input  pix_t   h_top,   // line above: becomes x2, shifts to x6
  input  pix_t   h_bot,   // line below: becomes x8, shifts to x12
  input  pix_t   v_prev,  // previous field x1, x7, x13 in phases 2, 4, 6
  input  pix_t   v_next,  // next field     x1, x7, x13 in phases 2, 4, 6
  output win_t   win
);

  typedef struct packed {
    pix_t x1p, x7p, x13p, x1f, x7f, x13f;
  } vcol_t;

  pix_t [4:0] top_sr, bot_sr;  // [4] newest sample
  vcol_t      vnew;             // column being collected this interval
  vcol_t      vdl [4];          // [3] column of the iteration now complete

  always_ff @(posedge clk) begin
    unique case (ph)
      3'd0: begin
        top_sr <= {h_top, top_sr[4:1]};
        bot_sr <= {h_bot, bot_sr[4:1]};
      end
      3'd2: begin vnew.x1p  <= v_prev; vnew.x1f  <= v_next; end
      3'd4: begin vnew.x7p  <= v_prev; vnew.x7f  <= v_next; end
      3'd6: begin vnew.x13p <= v_prev; vnew.x13f <= v_next; end
      3'd7: begin
        vdl[0] <= vnew;
        for (int k = 1; k < 4; k++) vdl[k] <= vdl[k-1];
      end
      default: ;
    endcase
  end

  // Newest sample is x6 of the completed iteration; oldest is x2.
  always_comb begin
    for (int k = 0; k < 5; k++) begin
      win.top[k] = top_sr[k];
      win.bot[k] = bot_sr[k];
    end
    win.x1p  = vdl[3].x1p;
    win.x7p  = vdl[3].x7p;
    win.x13p = vdl[3].x13p;
    win.x1f  = vdl[3].x1f;
    win.x7f  = vdl[3].x7f;
    win.x13f = vdl[3].x13f;
  end

endmodule
