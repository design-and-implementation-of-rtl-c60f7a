// tb_wallace_mult: self-checking test of the Wallace-tree multiplier at the
// three sizes the deinterlacer uses (17x9, 17x8, 12x9): corner cases and
// random operands compared with integer multiplication.
module tb_wallace_mult;
  logic [16:0] a1; logic [8:0] b1; logic [25:0] p1;
  logic [16:0] a2; logic [7:0] b2; logic [24:0] p2;
  logic [11:0] a3; logic [8:0] b3; logic [20:0] p3;
  int checks = 0, failures = 0;

  wallace_mult #(.AW(17), .BW(9)) u1 (.a(a1), .b(b1), .p(p1));
  wallace_mult #(.AW(17), .BW(8)) u2 (.a(a2), .b(b2), .p(p2));
  wallace_mult #(.AW(12), .BW(9)) u3 (.a(a3), .b(b3), .p(p3));

  task automatic check(longint got, longint want, string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("ERROR: %s = %0d, expected %0d", what, got, want);
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
    for (int i = 0; i < 3000; i++) begin
      a1 = 17'($urandom); b1 = 9'($urandom);
      a2 = 17'($urandom); b2 = 8'($urandom);
      a3 = 12'($urandom); b3 = 9'($urandom);
      if (i == 0) begin a1 = '1; b1 = '1; a2 = '1; b2 = '1; a3 = '1; b3 = '1; end
      if (i == 1) begin a1 = '0; b2 = '0; a3 = 12'd1; end
      if (i == 2) begin a1 = 17'h10000; b1 = 9'd256; end
      #1;
      check(longint'(p1), longint'(a1) * longint'(b1), "17x9");
      check(longint'(p2), longint'(a2) * longint'(b2), "17x8");
      check(longint'(p3), longint'(a3) * longint'(b3), "12x9");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
