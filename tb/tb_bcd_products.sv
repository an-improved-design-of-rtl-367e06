// tb_bcd_products: the converter in its intended use, after a binary
// multiplier of two BCD digits.
//
// For every digit pair a, b in 0..9 the testbench forms the binary product
// a*b (0..81), converts it with rev_bin2bcd7 and compares the two BCD digits
// with (a*b)/10 and (a*b) mod 10. Products whose units digits overflow the
// uncorrected units adder (20, 21, 24, 25, 30, 40, 54, 56, 63, 72) are
// expected to differ; every other product must convert exactly, and each of
// those ten must indeed come out wrong. The counts of correct and known-bad
// pairs are checked too (79 and 21 of the 100 pairs).
module tb_bcd_products;
  import rev_bcd_pkg::*;

  logic [6:0]  bin;
  bcd2_t       bcd;
  logic [3:0]  g;
  logic [15:0] adder_garbage;

  int checks = 0, failures = 0;
  int n_exact = 0, n_known_bad = 0;

  rev_bin2bcd7 dut (.bin, .bcd, .g, .adder_garbage);

  function automatic bit known_overflow(input int unsigned p);
    return p inside {20, 21, 24, 25, 30, 40, 54, 56, 63, 72};
  endfunction

  task automatic check(input bit ok, input string what, input int unsigned p);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (product %0d -> %0d%0d)", what, p, bcd.tens, bcd.units);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned p;
    bit exact;
    for (int a = 0; a < 10; a++) begin
      for (int b = 0; b < 10; b++) begin
        p   = unsigned'(a * b);
        bin = 7'(p);
        #1;
        exact = (bcd.tens == 4'(p / 10)) && (bcd.units == 4'(p % 10));
        if (known_overflow(p)) begin
          n_known_bad++;
          check(!exact, "known units overflow converts wrongly", p);
        end else begin
          n_exact++;
          check(exact, "product converts to BCD", p);
        end
      end
    end
    check(n_exact == 79 && n_known_bad == 21, "pair counts", 0);
    $display("digit pairs: %0d convert exactly, %0d hit the units overflow", n_exact, n_known_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
