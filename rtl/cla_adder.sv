// cla_adder: W-bit carry-lookahead adder, s = a + b + cin.
//
// The source design builds its combinational operators with carry look-ahead
// and Wallace-tree structures; this is the adder. Each bit forms generate
// g = a&b and propagate p = a^b. Groups of 4 bits compute their carries
// directly from g, p and the group's carry-in (lookahead inside the group),
// and a group generate/propagate pair passes the carry from group to group.
// The 4-bit group size is this design's own choice.
//
// Interface: purely combinational; a, b (W bits), cin in; s (W bits), cout out.
module cla_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned NG = (W + 3) / 4;   // number of 4-bit groups

  logic [4*NG-1:0] g, p, c;

  assign g = (4*NG)'(a & b);
  assign p = (4*NG)'(a ^ b);

  // One block per 4-bit group; g_grp[k].ci is the carry into group k.
  for (genvar k = 0; k < NG; k++) begin : g_grp
    logic ci, co;
    logic g0, g1, g2, g3, p0, p1, p2, p3;
    if (k == 0) begin : g_first
      assign ci = cin;
    end else begin : g_next
      assign ci = g_grp[k-1].co;
    end
    assign {g3, g2, g1, g0} = g[4*k +: 4];
    assign {p3, p2, p1, p0} = p[4*k +: 4];
    // carries inside the group, all from the group's carry-in
    assign c[4*k]     = ci;
    assign c[4*k + 1] = g0 | (p0 & ci);
    assign c[4*k + 2] = g1 | (p1 & g0) | (p1 & p0 & ci);
    assign c[4*k + 3] = g2 | (p2 & g1) | (p2 & p1 & g0) | (p2 & p1 & p0 & ci);
    // group generate / propagate give the next group's carry-in
    assign co = (g3 | (p3 & g2) | (p3 & p2 & g1) | (p3 & p2 & p1 & g0))
              | (p3 & p2 & p1 & p0 & ci);
  end

  assign s = p[W-1:0] ^ c[W-1:0];
  if (W % 4 == 0) begin : g_cout_group
    assign cout = g_grp[NG-1].co;
  end else begin : g_cout_bit
    assign cout = c[W];
  end

endmodule
