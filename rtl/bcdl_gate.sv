// bcdl_gate: 4x4 BCDL reversible gate, units-digit contribution of b6b5b4.
//
// Driven with A = 0 and {B,C,D} = {b6,b5,b4}, the output {P,Q,R,S} is what
// 16*{b6,b5,b4} leaves in the units position after bcdh_gate has taken its
// tens. For the six codes a product of two BCD digits can have:
//   b6b5b4 : 000 001 010 011 100 101
//   value  :   0  16  32  48  64  80
//   PQRS   :   0   6   2   8   4  10   (10 is not a BCD digit; the MPS gate
//                                        that follows turns it into carry + 0)
// The gate is defined by four sum-of-minterm functions over the index
// m = {A,B,C,D}; the A = 1 half and codes 110/111 only complete the map to a
// permutation of 0..15 so that the gate is reversible.
// Interface: single-bit inputs a..d and outputs p..s. Purely combinational,
// one gate delay.
module bcdl_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  logic [3:0] m;

  always_comb begin
    m = {a, b, c, d};
    p = m inside {4'd3, 4'd5, 4'd7, 4'd11, 4'd12, 4'd13, 4'd14, 4'd15};
    q = m inside {4'd1, 4'd4, 4'd7, 4'd9, 4'd10, 4'd13, 4'd14, 4'd15};
    r = m inside {4'd1, 4'd2, 4'd5, 4'd8, 4'd10, 4'd11, 4'd14, 4'd15};
    s = m inside {4'd6, 4'd8, 4'd9, 4'd10, 4'd11, 4'd12, 4'd13, 4'd15};
  end

endmodule
