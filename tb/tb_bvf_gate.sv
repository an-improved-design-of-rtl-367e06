// tb_bvf_gate: exhaustive self-check of the BVF gate.
// All 16 inputs: P = A, Q = A xor B, R = C, S = C xor D, the published
// example (1,0,1,0) -> (1,1,1,1), duplication of A and C when B = D = 0, and
// a check that the 16 output codes are all different.
module tb_bvf_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit [15:0] seen;

  bvf_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (in=%b out=%b)", what, {a, b, c, d}, {p, q, r, s});
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
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      check(p == a, "P = A");
      check(q == (a != b), "Q = A xor B");
      check(r == c, "R = C");
      check(s == (c != d), "S = C xor D");
      if (!b && !d) check(p == a && q == a && r == c && s == c, "duplication");
      check(!seen[{p, q, r, s}], "output code unique");
      seen[{p, q, r, s}] = 1'b1;
    end
    {a, b, c, d} = 4'b1010;
    #1;
    check({p, q, r, s} == 4'b1111, "example 1010 -> 1111");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
