// divider: combinational unsigned integer divider, q = floor(n / d).
//
// The deinterlacer builds its arithmetic from combinational operators that are
// reused in several cycles of the 8-cycle initiation interval; this is the
// division operator. It is a restoring array divider: NW rows, each comparing
// the partial remainder (shifted left by one, next dividend bit appended)
// with the divisor and subtracting it when it fits. The row structure is this
// design's own choice; the source design only states that its dividers are
// combinational and use fixed-point operands.
//
// Interface: n (NW bits) and d (DW bits) in, q (NW bits) and r (DW bits) out,
// no clock. d must not be zero (every user adds a positive constant to its
// divisor); a zero divisor yields q = all ones, r = n's low bits.
module divider #(
  parameter int unsigned NW = 32,  // dividend / quotient width
  parameter int unsigned DW = 20   // divisor / remainder width
) (
  input  logic [NW-1:0] n,
  input  logic [DW-1:0] d,
  output logic [NW-1:0] q,
  output logic [DW-1:0] r
);

  always_comb begin
    logic [DW:0] rem;
    rem = '0;
    q   = '0;
    for (int i = NW - 1; i >= 0; i--) begin
      rem = {rem[DW-1:0], n[i]};
      if (rem >= {1'b0, d}) begin
        rem  = rem - {1'b0, d};
        q[i] = 1'b1;
      end
    end
    r = rem[DW-1:0];
  end

endmodule
