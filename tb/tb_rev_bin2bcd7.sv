// tb_rev_bin2bcd7: end-to-end self-check of the reversible 7-bit binary to
// BCD converter, all 128 inputs, default configuration.
//
// The expected outputs come from an integer model of the conversion steps
// written here: 16*b6b5b4 split into tens and units (80 as 7 + 10), decimal
// correction of the low nibble and of that units digit, the two carries
// added to the tens, and the two corrected units digits added without
// further correction. The testbench then checks:
//   - bcd and every garbage output against that model, for all 128 inputs;
//   - bcd against the true decimal value for every input below 96 whose units
//     digits add to at most 9, and that exactly 26 inputs below 96 (the known
//     units-overflow set) do not convert;
//   - the worked example 1010001 (81) -> 1000 0001;
//   - that no two inputs give the same {bcd, garbage} (no information lost).
// Each mechanism of the datapath is counted and must occur at least once:
// low-nibble correction, BCDL-digit correction, both carries at once (carry
// count 2), and a tens digit raised by the carry count.
module tb_rev_bin2bcd7;
  import rev_bcd_pkg::*;

  logic [6:0]  bin;
  bcd2_t       bcd;
  logic [3:0]  g;
  logic [15:0] adder_garbage;

  int checks = 0, failures = 0;
  int n_fix_lo = 0, n_fix_hi = 0, n_two_carries = 0, n_tens_raised = 0;
  int n_true_bcd = 0, n_overflow = 0;
  bit [27:0] outputs_seen [$];

  rev_bin2bcd7 dut (.bin, .bcd, .g, .adder_garbage);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (bin=%0d bcd=%h g=%b)", what, bin, bcd, g);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned hs, lo, h_units, h_tens, c_lo, d_lo, c_hi, d_hi;
    int unsigned units_sum, tens_sum, v;
    bit [27:0] word;

    for (int i = 0; i < 128; i++) begin
      bin = 7'(i);
      #1;
      v  = unsigned'(i);
      hs = v / 16;
      lo = v % 16;
      // 16*b6b5b4 as tens + units; codes 110 and 111 follow the gate tables.
      case (hs)
        5:       begin h_tens = 7;  h_units = 10; end
        6:       begin h_tens = 9;  h_units = 1;  end
        7:       begin h_tens = 10; h_units = 12; end
        default: begin h_tens = (16 * hs) / 10; h_units = (16 * hs) % 10; end
      endcase
      c_lo = (lo > 9) ? 1 : 0;
      d_lo = lo % 10;
      c_hi = (h_units > 9) ? 1 : 0;
      d_hi = h_units % 10;
      tens_sum  = h_tens + c_lo + c_hi;
      units_sum = d_lo + d_hi;

      check(bcd.tens == 4'(tens_sum) && bcd.units == 4'(units_sum), "bcd vs step model");
      check(g[0] == c_lo[0] && g[1] == c_hi[0], "g1, g0 carry copies");
      check(g[2] == (units_sum > 15) && g[3] == (tens_sum > 15), "g3, g2 adder carry outs");
      check(adder_garbage[7:0] == {d_lo[3], d_hi[3], d_lo[2], d_hi[2],
                                   d_lo[1], d_hi[1], d_lo[0], d_hi[0]},
            "units adder garbage");

      if (v < 96) begin
        if (units_sum <= 9) begin
          n_true_bcd++;
          check(bcd.tens == 4'(v / 10) && bcd.units == 4'(v % 10), "true BCD value");
        end else begin
          n_overflow++;
        end
      end

      word = {bcd, g, adder_garbage};
      foreach (outputs_seen[k]) check(outputs_seen[k] != word, "distinct outputs");
      outputs_seen.push_back(word);

      if (dut.carry_lo) n_fix_lo++;
      if (dut.carry_hi) n_fix_hi++;
      if (dut.cnt_carry) n_two_carries++;
      if (dut.cnt_carry || dut.cnt_sum) n_tens_raised++;
    end

    check(n_true_bcd == 70 && n_overflow == 26, "70 of 0..95 convert, 26 overflow the units adder");

    bin = 7'b1010001;
    #1;
    check(bcd == 8'b1000_0001, "example 1010001 -> 1000 0001");

    $display("mechanisms: low-nibble correction %0d, BCDL correction %0d, carry count 2: %0d, tens raised %0d",
             n_fix_lo, n_fix_hi, n_two_carries, n_tens_raised);
    $display("inputs 0..95: %0d convert to valid BCD, %0d overflow the units digit", n_true_bcd, n_overflow);
    check(n_fix_lo > 0, "low-nibble correction occurred");
    check(n_fix_hi > 0, "BCDL correction occurred");
    check(n_two_carries > 0, "carry count of 2 occurred");
    check(n_tens_raised > 0, "tens raised by carries occurred");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
