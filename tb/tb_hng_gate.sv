// tb_hng_gate: exhaustive self-check of the HNG gate.
// All 16 inputs. With D = 0, {S,R} must equal the integer sum A + B + C (full
// adder); with D = 1, S is that carry inverted. P and Q must copy A and B,
// and the 16 output codes must all be different.
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  bit [15:0] seen;
  logic [1:0] total;

  hng_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);

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
      total = 2'(a) + 2'(b) + 2'(c);
      check(p == a && q == b, "P = A, Q = B");
      check(r == total[0], "R = sum bit");
      check(s == (total[1] ^ d), "S = carry xor D");
      check(!seen[{p, q, r, s}], "output code unique");
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
