// rev_bcd_pkg: types shared by the reversible binary-to-BCD converter.
//
// A BCD digit is a 4-bit nibble; the converter's 8-bit result is a packed pair
// of digits, tens in the upper nibble (c7..c4) and units in the lower nibble
// (c3..c0). Nothing here is clocked; the package only names the bundles that
// the gate-level modules pass between them.
package rev_bcd_pkg;

  typedef logic [3:0] nibble_t;

  // Two-digit BCD value, bit-compatible with c7..c0.
  typedef struct packed {
    nibble_t tens;
    nibble_t units;
  } bcd2_t;

endpackage
