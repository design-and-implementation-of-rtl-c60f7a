// tb_deint_ctrl: self-checking test of the schedule controller.
// Checks that the phase counter starts at 0 after reset and counts modulo 8,
// and that y_valid is high exactly in cycle 63 of every iteration whose five
// samples (presented in phase 0 of five consecutive intervals) were valid,
// under a random h_valid pattern.
module tb_deint_ctrl;
  import deint_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0, h_valid = 1'b0;
  phase_t ph;
  logic   y_valid;
  int checks = 0, failures = 0;
  int cyc = 0;
  bit hv_hist[int];      // interval index -> sample valid

  deint_ctrl dut (.clk, .rst_n, .h_valid, .ph, .y_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_out = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // cycle 0 = first cycle after reset release
    for (cyc = 0; cyc < 8 * 300; cyc++) begin
      int iv, p;
      bit expv;
      iv = cyc / 8;
      p  = cyc % 8;
      checks++;
      if (int'(ph) != p) begin
        failures++;
        $display("ERROR: cycle %0d phase %0d expected %0d", cyc, ph, p);
      end
      if (p == 0) begin
        h_valid = ($urandom_range(0, 9) != 0);
        hv_hist[iv] = h_valid;
      end
      // iteration j = iv - 7 outputs in phase 7
      expv = 1'b0;
      if (p == 7 && iv >= 7) begin
        expv = 1'b1;
        for (int k = 0; k < 5; k++) expv &= hv_hist[iv - 7 + k];
      end
      checks++;
      if (y_valid !== expv) begin
        failures++;
        $display("ERROR: cycle %0d y_valid %0b expected %0b", cyc, y_valid, expv);
      end
      if (y_valid) n_out++;
      @(negedge clk);
    end
    checks++;
    if (n_out < 50) begin
      failures++;
      $display("ERROR: only %0d outputs", n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
