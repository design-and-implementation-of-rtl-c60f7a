// tb_spatial_interp: self-checking test of the spatial interpolator.
// A new random neighbourhood is applied every 8 cycles (stable in phases
// 1..7); d_min4 is checked in phase 5 of the same interval and in phase 4 of
// the next, y_spatial in phase 2 of the next interval and again in phase 1 of
// the one after (the ends of their valid windows), against the integer
// reference model. Each edge
// direction must win at least once.
module tb_spatial_interp;
  import deint_pkg::*;
  import deint_ref_pkg::*;

  localparam int N = 3000;

  logic   clk = 1'b0;
  phase_t ph = '0;
  win_t   win;
  dsum_t  d_min4;
  yfix_t  y_spatial;
  int checks = 0, failures = 0;
  ref_t   e [int];
  int     n_dir[3] = '{0, 0, 0};

  spatial_interp dut (.clk, .ph, .win, .d_min4, .y_spatial);

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
          n_dir[e[iv].dir]++;
        end
        if (p == 5 && iv < N) expect_eq("d_min4", longint'(d_min4), e[iv].dmin4, iv);
        if (p == 4 && iv >= 1 && iv <= N) expect_eq("d_min4 (held)", longint'(d_min4), e[iv - 1].dmin4, iv - 1);
        if (p == 2 && iv >= 1 && iv <= N) expect_eq("y_spatial", longint'(y_spatial), e[iv - 1].ys, iv - 1);
        if (p == 1 && iv >= 2) expect_eq("y_spatial (held)", longint'(y_spatial), e[iv - 2].ys, iv - 2);
      end
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (n_dir[k] == 0) begin
        failures++;
        $display("ERROR: direction %0d never best", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
