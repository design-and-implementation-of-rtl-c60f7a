// deint_ctrl: schedule controller of the deinterlacer pipeline.
//
// The pipeline starts one iteration every II = 8 cycles and every operator is
// bound to fixed cycles ("phases") of that interval, so the whole schedule is
// driven by one modulo-8 phase counter. An iteration whose first horizontal
// sample (x2) is presented in phase 0 of interval j finishes in cycle 63 of
// its life, the last cycle of interval j+7, as in the source design's
// schedule (latency 64, initiation interval 8).
//
// The controller also tracks which iterations are real: h_valid, sampled in
// phase 0, says whether the horizontal buses carry a sample. An iteration is
// valid when the five samples it consumes (x2..x6, presented in intervals
// j..j+4) were all valid; its output strobe y_valid is then raised for one
// cycle, cycle 63. Reset (asynchronous, active low) and this validity rule are
// this design's own choices.
//
// Interface: ph is the current phase (0..7), registered. y_valid is
// registered and high in phase 7 of the output interval.
module deint_ctrl
  import deint_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   h_valid,  // horizontal buses carry a sample (phase 0)
  output phase_t ph,
  output logic   y_valid
);

  // hv[k]: the sample presented k intervals ago (after this interval's phase 0).
  logic [II-1:0] hv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph      <= '0;
      hv      <= '0;
      y_valid <= 1'b0;
    end else begin
      ph <= ph + 3'd1;
      if (ph == 3'd0) hv <= {hv[II-2:0], h_valid};
      // Iteration started 7 intervals ago used samples of ages 7..3.
      y_valid <= (ph == 3'd6) && (&hv[7:3]);
    end
  end

  // The output slot is the last cycle of an interval, and lasts one cycle.
  a_out_slot : assert property (@(posedge clk) disable iff (!rst_n)
    y_valid |-> (ph == 3'd7) ##1 !y_valid);

endmodule
