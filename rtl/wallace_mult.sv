// wallace_mult: unsigned AW x BW multiplier, Wallace tree plus CLA adder.
//
// The source design builds its multipliers as Wallace trees. The BW partial
// products (a shifted by i where b[i] = 1) are reduced by layers of 3:2
// carry-save adders, each layer turning every group of three rows into a sum
// row and a carry row, until two rows remain; a carry-lookahead adder
// (cla_adder) adds them. A BW-row tree needs about log1.5(BW/2) layers:
// 9 rows take 4 layers (9 -> 6 -> 4 -> 3 -> 2). The row-wise layering is this
// design's own choice.
//
// Interface: purely combinational; a (AW bits), b (BW bits, BW >= 2) in;
// p = a * b (AW+BW bits) out.
module wallace_mult #(
  parameter int unsigned AW = 17,
  parameter int unsigned BW = 9
) (
  input  logic [AW-1:0]    a,
  input  logic [BW-1:0]    b,
  output logic [AW+BW-1:0] p
);

  localparam int unsigned PW = AW + BW;

  // Number of rows left after l reduction layers.
  function automatic int unsigned rows_at(int unsigned l);
    int unsigned r;
    r = BW;
    for (int unsigned k = 0; k < l; k++) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  function automatic int unsigned n_layers();
    int unsigned l;
    l = 0;
    for (int unsigned k = 0; k < 64; k++)
      if (rows_at(k) > 2) l = k + 1;
    return l;
  endfunction

  localparam int unsigned L = n_layers();

  // g_layer[l].r holds the rows after l reduction layers.
  for (genvar l = 0; l <= L; l++) begin : g_layer
    logic [PW-1:0] r [BW];
    if (l == 0) begin : g_pp
      for (genvar i = 0; i < BW; i++) begin : g_row
        assign r[i] = b[i] ? (PW'(a) << i) : '0;
      end
    end else begin : g_csa_layer
      localparam int unsigned R  = rows_at(l - 1);
      localparam int unsigned G  = R / 3;
      localparam int unsigned RN = rows_at(l);
      for (genvar k = 0; k < G; k++) begin : g_csa
        logic [PW-1:0] x, y, z;
        assign x = g_layer[l-1].r[3*k];
        assign y = g_layer[l-1].r[3*k + 1];
        assign z = g_layer[l-1].r[3*k + 2];
        assign r[2*k]     = x ^ y ^ z;
        assign r[2*k + 1] = ((x & y) | (x & z) | (y & z)) << 1;
      end
      for (genvar k = 0; k < R % 3; k++) begin : g_pass
        assign r[2*G + k] = g_layer[l-1].r[3*G + k];
      end
      for (genvar k = RN; k < BW; k++) begin : g_zero
        assign r[k] = '0;
      end
    end
  end

  logic cout;
  cla_adder #(.W(PW)) u_add (
    .a(g_layer[L].r[0]), .b(g_layer[L].r[1]), .cin(1'b0), .s(p), .cout(cout)
  );

endmodule
