// tb_blender: self-checking test of the final mix and output timing.
// Applies random y_spatial, y_temp (4 fraction bits) and w_temp every 8
// cycles, stable from phase 1, and checks y_out in phase 7 two intervals
// later (cycle 63 of the iteration when the inputs arrive in cycles 41..47)
// against the rounded, limited mix. Extreme inputs make the limiting at 255
// happen; weights 0 and 1 and the limiting must each occur.
module tb_blender;
  import deint_pkg::*;
  import deint_ref_pkg::*;

  localparam int N = 3000;

  logic   clk = 1'b0;
  phase_t ph = '0;
  yfix_t  y_spatial, y_temp;
  wtemp_t w_temp;
  pix_t   y_out;
  int checks = 0, failures = 0;
  int     e [int];
  int     n_lim = 0, n0 = 0, n1 = 0;

  blender dut (.clk, .ph, .y_spatial, .y_temp, .w_temp, .y_out);

  always #5 clk = ~clk;
  always @(posedge clk) ph <= ph + 3'd1;

  initial begin
    repeat (8 * (N + 10)) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    y_spatial = '0; y_temp = '0; w_temp = '0;
    do @(negedge clk); while (ph != 3'd7);
    for (int iv = 0; iv < N + 2; iv++) begin
      for (int p = 0; p < 8; p++) begin
        @(negedge clk);
        if (p == 0 && iv < N) begin
          int ys, yt, wt;
          ys = $urandom_range(0, 4095);
          yt = $urandom_range(0, 4095);
          wt = $urandom_range(0, 256);
          case ($urandom_range(0, 7))
            0: wt = 0;
            1: wt = 256;
            2: begin ys = $urandom_range(4088, 4095); yt = $urandom_range(4088, 4095); end
            default: ;
          endcase
          y_spatial = yfix_t'(ys); y_temp = yfix_t'(yt); w_temp = wtemp_t'(wt);
          e[iv] = blend(ys, yt, wt);
          if (ys * 256 + wt * (yt - ys) + 2048 >= 256 * 4096) n_lim++;
          if (wt == 0) n0++;
          if (wt == 256) n1++;
        end
        if (p == 7 && iv >= 2) begin
          checks++;
          if (int'(y_out) != e[iv - 2]) begin
            failures++;
            if (failures < 10) $display("ERROR: y_out %0d expected %0d (interval %0d)", y_out, e[iv - 2], iv - 2);
          end
        end
      end
    end
    checks++;
    if (n_lim == 0 || n0 == 0 || n1 == 0) begin
      failures++;
      $display("ERROR: cases limit %0d w0 %0d w1 %0d", n_lim, n0, n1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
