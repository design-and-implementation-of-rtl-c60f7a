// tb_temporal_interp: self-checking test of the temporal interpolator.
// A new random neighbourhood is applied every 8 cycles; y_temp is checked in
// phase 2 of the next interval and in phase 1 of the one after, against the
// integer reference model. The previous-field and the next-field candidate
// must each be preferred at least once, and equal weights must occur.
module tb_temporal_interp;
  import deint_pkg::*;
  import deint_ref_pkg::*;

  localparam int N = 3000;

  logic   clk = 1'b0;
  phase_t ph = '0;
  win_t   win;
  yfix_t  y_temp;
  int checks = 0, failures = 0;
  ref_t   e [int];
  int     n_p = 0, n_f = 0, n_eq = 0;

  temporal_interp dut (.clk, .ph, .win, .y_temp);

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
    do @(negedge clk); while (ph != 3'd7);
    for (int iv = 0; iv < N + 2; iv++) begin
      for (int p = 0; p < 8; p++) begin
        @(negedge clk);
        if (p == 0 && iv < N) begin
          win   = rand_win();
          e[iv] = compute(to_nbhd(win));
          if (e[iv].wp > e[iv].wf) n_p++; else if (e[iv].wf > e[iv].wp) n_f++; else n_eq++;
        end
        if (p == 2 && iv >= 1 && iv <= N) expect_eq("y_temp", longint'(y_temp), e[iv - 1].yt, iv - 1);
        if (p == 1 && iv >= 2) expect_eq("y_temp (held)", longint'(y_temp), e[iv - 2].yt, iv - 2);
      end
    end
    checks++;
    if (n_p == 0 || n_f == 0 || n_eq == 0) begin
      failures++;
      $display("ERROR: weight cases prev %0d next %0d equal %0d", n_p, n_f, n_eq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
