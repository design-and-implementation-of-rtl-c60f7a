// tb_motion_detect: self-checking test of the motion detector.
// Applies a random neighbourhood and a d_min4 value every 8 cycles (d_min4
// either the one the spatial interpolator would give or a random one) and
// checks w_temp in phase 7 of the same interval and in phase 6 of the next
// (end of its valid window) against the integer reference model. Weights of
// exactly 0, exactly 1 and in between must each occur.
module tb_motion_detect;
  import deint_pkg::*;
  import deint_ref_pkg::*;

  localparam int N = 3000;

  logic   clk = 1'b0;
  phase_t ph = '0;
  win_t   win;
  dsum_t  d_min4;
  wtemp_t w_temp;
  int checks = 0, failures = 0;
  ref_t   e [int];
  int     n0 = 0, n1 = 0, nm = 0;

  motion_detect dut (.clk, .ph, .win, .d_min4, .w_temp);

  always #5 clk = ~clk;
  always @(posedge clk) ph <= ph + 3'd1;

  task automatic expect_eq(string what, longint got, longint want, int iv);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("ERROR: %s = %0d, expected %0d (interval %0d)", what, got, want, iv);
    end
  endtask

  initial begin
    repeat (8 * (N + 10)) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    win = '0;
    d_min4 = '0;
    do @(negedge clk); while (ph != 3'd7);
    for (int iv = 0; iv < N + 1; iv++) begin
      for (int p = 0; p < 8; p++) begin
        @(negedge clk);
        if (p == 0 && iv < N) begin
          int dm;
          win = rand_win();
          dm  = ($urandom_range(0, 1) != 0) ? compute(to_nbhd(win)).dmin4 : $urandom_range(0, 1020);
          d_min4 = dsum_t'(dm);
          e[iv] = compute(to_nbhd(win), dm);
          if (e[iv].wt == 0) n0++; else if (e[iv].wt == 256) n1++; else nm++;
        end
        if (p == 7 && iv < N) expect_eq("w_temp", longint'(w_temp), e[iv].wt, iv);
        if (p == 6 && iv >= 1) expect_eq("w_temp (held)", longint'(w_temp), e[iv - 1].wt, iv - 1);
      end
    end
    checks++;
    if (n0 == 0 || n1 == 0 || nm == 0) begin
      failures++;
      $display("ERROR: weight cases zero %0d one %0d mixed %0d", n0, n1, nm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
