// rev_bin2bcd7: 7-bit binary to 8-bit BCD converter built only from
// reversible gates, for converting the binary product of two BCD digits
// (0..81) back to two BCD digits.
//
// The input b6..b0 is split in two. The low nibble b3..b0 goes through an MPS
// gate, which turns it into a BCD digit and a decimal carry. The high bits
// b6b5b4 are worth 16*b6b5b4; their decimal value is produced directly by two
// table gates: BCDH gives the tens digit and BCDL the units digit. Since a
// reversible circuit may not fan out a wire, b6 is copied with a Feynman gate
// and b5, b4 with one BVF gate, so that BCDH and BCDL each get their own
// copy. The BCDL digit goes through a second MPS gate (it is 10 for
// b6b5b4 = 101). One HNG gate adds the two decimal carries into a 2-bit
// count {carry, sum}, and two 4-bit HNG adders form the result:
//   tens  c7..c4 = BCDH + {0,0,carry,sum}
//   units c3..c0 = MPS(b3..b0) digit + MPS(BCDL) digit
// That is 15 gates (9 HNG, 2 MPS, 1 BVF, 1 FG, 1 BCDH, 1 BCDL), 21 constant
// inputs and 20 garbage outputs, and 15 gate delays on the longest count.
//
// Known limitation, kept because it is the structure as specified: the units
// adder has no decimal correction and its carry out (g2) is discarded. When
// the two units digits add up to more than 9 the result is not valid BCD.
// In 0..95 this happens for 26 inputs (20-25, 30, 31, 40, 41, 50-57, 60-63,
// 70-73); among products of two digits it hits 20, 21, 24, 25, 30, 40, 54,
// 56, 63 and 72. Inputs 96..127 (b6b5b4 = 110 or 111) are outside the range
// the BCDH/BCDL tables are built for. All other inputs convert correctly.
//
// Interface: bin = b6..b0 in; bcd = c7..c0 out (tens, units); g = {g3,g2,g1,
// g0}, the garbage outputs of the two adders' carry outs and of the carry
// HNG; adder_garbage = the 16 input copies returned by the adders' HNG gates
// (tens adder in [15:8], units adder in [7:0]). Purely combinational.
module rev_bin2bcd7
  import rev_bcd_pkg::*;
(
  input  logic [6:0]  bin,
  output bcd2_t       bcd,
  output logic [3:0]  g,
  output logic [15:0] adder_garbage
);

  // Copies of the high bits: *_h feed BCDH, *_l feed BCDL.
  logic b6_h, b6_l, b5_h, b5_l, b4_h, b4_l;
  nibble_t hi_tens;            // BCDH output
  nibble_t hi_units_raw;       // BCDL output, may be 10
  logic    carry_lo;           // MPS on b3..b0: b3..b0 > 9
  nibble_t digit_lo;           // MPS on b3..b0: corrected digit
  logic    carry_hi;           // MPS on BCDL: BCDL output > 9
  nibble_t digit_hi;           // MPS on BCDL: corrected digit
  logic    cnt_sum, cnt_carry; // HNG: carry_lo + carry_hi

  // Fan-out of b6, b5, b4 (constant 0 on the XOR input of each copy).
  fg_gate u_fg (
    .a (bin[6]), .b (1'b0),
    .p (b6_h),   .q (b6_l)
  );

  bvf_gate u_bvf (
    .a (bin[5]), .b (1'b0), .c (bin[4]), .d (1'b0),
    .p (b5_h),   .q (b5_l), .r (b4_h),   .s (b4_l)
  );

  // Decimal value of 16*b6b5b4, tens and units.
  bcdh_gate u_bcdh (
    .a (1'b0), .b (b6_h), .c (b5_h), .d (b4_h),
    .p (hi_tens[3]), .q (hi_tens[2]), .r (hi_tens[1]), .s (hi_tens[0])
  );

  bcdl_gate u_bcdl (
    .a (1'b0), .b (b6_l), .c (b5_l), .d (b4_l),
    .p (hi_units_raw[3]), .q (hi_units_raw[2]),
    .r (hi_units_raw[1]), .s (hi_units_raw[0])
  );

  // BCD detection and correction of the low nibble and of the BCDL digit.
  mps_gate u_mps_lo (
    .a (1'b0),   .b (bin[3]),      .c (bin[2]),      .d (bin[1]),      .e (bin[0]),
    .p (carry_lo), .q (digit_lo[3]), .r (digit_lo[2]), .s (digit_lo[1]), .t (digit_lo[0])
  );

  mps_gate u_mps_hi (
    .a (1'b0),
    .b (hi_units_raw[3]), .c (hi_units_raw[2]), .d (hi_units_raw[1]), .e (hi_units_raw[0]),
    .p (carry_hi), .q (digit_hi[3]), .r (digit_hi[2]), .s (digit_hi[1]), .t (digit_hi[0])
  );

  // Count of the two decimal carries (0, 1 or 2).
  hng_gate u_hng_carry (
    .a (carry_hi), .b (carry_lo), .c (1'b0), .d (1'b0),
    .p (g[1]),     .q (g[0]),     .r (cnt_sum), .s (cnt_carry)
  );

  // Tens digit: BCDH digit plus the carry count.
  rev_adder4 u_add_tens (
    .x       (hi_tens),
    .y       ({2'b00, cnt_carry, cnt_sum}),
    .cin     (1'b0),
    .sum     (bcd.tens),
    .cout    (g[3]),
    .garbage (adder_garbage[15:8])
  );

  // Units digit: sum of the two corrected units digits.
  rev_adder4 u_add_units (
    .x       (digit_hi),
    .y       (digit_lo),
    .cin     (1'b0),
    .sum     (bcd.units),
    .cout    (g[2]),
    .garbage (adder_garbage[7:0])
  );

endmodule
