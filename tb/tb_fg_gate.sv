// tb_fg_gate: exhaustive self-check of the Feynman gate.
// Applies all four input pairs, checks P = A and Q = A xor B against
// values computed here, checks that B = 0 yields two copies of A, and checks
// that the four outputs are all different (the gate is reversible).
module tb_fg_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  bit [3:0] seen;

  fg_gate dut (.a, .b, .p, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (a=%0b b=%0b p=%0b q=%0b)", what, a, b, p, q);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      check(p == a, "P = A");
      check(q == (a != b), "Q = A xor B");
      if (!b) check(p == a && q == a, "copy of A when B = 0");
      check(!seen[{p, q}], "output code unique");
      seen[{p, q}] = 1'b1;
    end
    check(&seen, "all output codes reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
