// tb_mps_gate: exhaustive self-check of the MPS BCD correction gate.
// All 32 inputs. For A = 0 the nibble x = {B,C,D,E} must come out as carry
// P = (x > 9) and digit {Q,R,S,T} = x mod 10, computed here with integer
// arithmetic. For A = 1 the P, Q and S outputs are checked against the
// gate's published equations. T = E throughout, and all 32 output codes must
// be different (the gate is a permutation).
module tb_mps_gate;
  logic a, b, c, d, e, p, q, r, s, t;
  int checks = 0, failures = 0;
  bit [31:0] seen;
  int unsigned x;

  mps_gate dut (.a, .b, .c, .d, .e, .p, .q, .r, .s, .t);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (in=%b out=%b)", what, {a, b, c, d, e}, {p, q, r, s, t});
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
    for (int i = 0; i < 32; i++) begin
      {a, b, c, d, e} = 5'(i);
      #1;
      x = unsigned'(i % 16);
      check(t == e, "T = E");
      if (!a) begin
        check(p == (x > 9), "decimal carry");
        check({q, r, s, t} == 4'(x % 10), "corrected digit");
      end else begin
        // A = 1: P = B' + BC'D', Q = B + C + D, S = BCD + B'D' + BC'
        check(p == (!b || (b && !c && !d)), "P for A = 1");
        check(q == (b || c || d), "Q for A = 1");
        check(s == ((b && c && d) || (!b && !d) || (b && !c)), "S for A = 1");
      end
      check(!seen[{p, q, r, s, t}], "output code unique");
      seen[{p, q, r, s, t}] = 1'b1;
    end
    check(&seen, "all 32 output codes reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
