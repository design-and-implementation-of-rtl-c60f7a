// tb_cla_adder: self-checking test of the carry-lookahead adder at a width
// that is a multiple of the 4-bit group (16) and one that is not (26):
// carry-chain corner cases and random operands with both carry-in values.
module tb_cla_adder;
  logic [15:0] a1, b1, s1; logic c1, co1;
  logic [25:0] a2, b2, s2; logic c2, co2;
  int checks = 0, failures = 0;

  cla_adder #(.W(16)) u1 (.a(a1), .b(b1), .cin(c1), .s(s1), .cout(co1));
  cla_adder #(.W(26)) u2 (.a(a2), .b(b2), .cin(c2), .s(s2), .cout(co2));

  task automatic check(longint got, longint want, string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("ERROR: %s = %0h, expected %0h", what, got, want);
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
      a1 = 16'($urandom); b1 = 16'($urandom); c1 = 1'($urandom);
      a2 = 26'($urandom); b2 = 26'($urandom); c2 = 1'($urandom);
      if (i == 0) begin a1 = '1; b1 = '0; c1 = 1'b1; a2 = '1; b2 = '0; c2 = 1'b1; end
      if (i == 1) begin a1 = '1; b1 = '1; c1 = 1'b1; a2 = '1; b2 = '1; c2 = 1'b0; end
      if (i == 2) begin a1 = 16'h7fff; b1 = 16'h0001; c1 = 1'b0; a2 = 26'h0fff_fff; b2 = 26'h1; c2 = 1'b0; end
      #1;
      check(longint'({co1, s1}), longint'(a1) + longint'(b1) + longint'(c1), "16-bit");
      check(longint'({co2, s2}), longint'(a2) + longint'(b2) + longint'(c2), "26-bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
