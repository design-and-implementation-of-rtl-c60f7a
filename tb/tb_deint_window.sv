// tb_deint_window: self-checking test of the input buses and neighbourhood.
// Drives random samples on the horizontal buses in phase 0 and random columns
// on the vertical buses in phases 2/4/6, and checks that in phases 1..7 of
// interval j+4 the window holds x2..x6, x8..x12 from the samples of
// intervals j..j+4 and x1/x7/x13 of both fields from interval j.
module tb_deint_window;
  import deint_pkg::*;

  logic   clk = 1'b0;
  phase_t ph = '0;
  pix_t   h_top = '0, h_bot = '0, v_prev = '0, v_next = '0;
  win_t   win;
  int checks = 0, failures = 0;

  pix_t st[int], sb[int], vp[int][3], vn[int][3];

  deint_window dut (.clk, .ph, .h_top, .h_bot, .v_prev, .v_next, .win);

  always #5 clk = ~clk;
  always @(posedge clk) ph <= ph + 3'd1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    do @(negedge clk); while (ph != 3'd7);
    for (int iv = 0; iv < 200; iv++) begin
      for (int p = 0; p < 8; p++) begin
        @(negedge clk);
        if (p != int'(ph)) $fatal(1, "tb phase out of step");
        if (p >= 1 && iv >= 4) begin
          int j;
          win_t e;
          j = iv - 4;
          for (int k = 0; k < 5; k++) begin
            e.top[k] = st[j + k];
            e.bot[k] = sb[j + k];
          end
          e.x1p = vp[j][0]; e.x7p = vp[j][1]; e.x13p = vp[j][2];
          e.x1f = vn[j][0]; e.x7f = vn[j][1]; e.x13f = vn[j][2];
          checks++;
          if (win != e) begin
            failures++;
            if (failures < 10) $display("ERROR: interval %0d phase %0d window %h expected %h", iv, p, win, e);
          end
        end
        if (p == 0) begin
          h_top = pix_t'($urandom); h_bot = pix_t'($urandom);
          st[iv] = h_top; sb[iv] = h_bot;
        end
        if (p == 2 || p == 4 || p == 6) begin
          v_prev = pix_t'($urandom); v_next = pix_t'($urandom);
          vp[iv][p / 2 - 1] = v_prev; vn[iv][p / 2 - 1] = v_next;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
