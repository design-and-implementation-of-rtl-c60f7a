// tb_divider: self-checking test of the combinational divider.
// Applies corner cases and random operands at the widths the deinterlacer
// uses (32/20) and checks quotient and remainder against integer division.
module tb_divider;
  localparam int unsigned NW = 32;
  localparam int unsigned DW = 20;

  logic [NW-1:0] n, q;
  logic [DW-1:0] d, r;
  int checks = 0, failures = 0;

  divider #(.NW(NW), .DW(DW)) dut (.n, .d, .q, .r);

  task automatic check(logic [NW-1:0] nn, logic [DW-1:0] dd);
    longint unsigned eq, er;
    n = nn; d = dd;
    #1;
    eq = longint'(nn) / longint'(dd);
    er = longint'(nn) % longint'(dd);
    checks++;
    if (longint'(q) != eq || longint'(r) != er) begin
      failures++;
      if (failures < 10) $display("ERROR: %0d / %0d gave %0d r %0d, expected %0d r %0d", nn, dd, q, r, eq, er);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 1);
    check(1, 1);
    check('1, 1);
    check('1, '1);
    check(1024 << 8, 4);
    check(255 * 65536, 3 * 65536);
    for (int i = 0; i < 2000; i++) begin
      logic [DW-1:0] dd;
      dd = DW'($urandom);
      if (i % 3 == 0) dd = DW'($urandom_range(1, 2000));
      if (dd == 0) dd = 1;
      check(NW'($urandom), dd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
