// mps_gate: 5x5 MPS reversible gate, BCD detection and correction.
//
// With A = 0 and a nibble x = {B,C,D,E} on the other inputs, P is the decimal
// carry (x > 9) and {Q,R,S,T} is the corrected digit: x itself when x <= 9,
// otherwise x + 6 modulo 16 (that is x - 10). T = E always, since adding 6
// never changes the least significant bit. With A = 1 the gate maps the
// sixteen remaining input codes onto the sixteen output codes the A = 0 half
// does not use, so the whole 5x5 map is a permutation.
//
// Equations (' is NOT):
//   P = AB' + A'BC + BC'(A xor D)
//   Q = A(C + BC') + C'(AB'D + A'BD')
//   R = A'C(B' + BD) + AC'D' + AC(B + D)
//   S = BC(A xnor D) + B'(A xor D) + ABC'
//   T = E
// P, Q, S and T are the gate's published equations. The A = 1 half of R is
// this design's completion: it is the one choice that keeps the gate
// reversible given the other four outputs.
// Interface: single-bit inputs a..e and outputs p..t. Purely combinational,
// one gate delay.
module mps_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t
);

  always_comb begin
    p = (a & ~b) | (~a & b & c) | (b & ~c & (a ^ d));
    q = (a & (c | (b & ~c))) | (~c & ((a & ~b & d) | (~a & b & ~d)));
    r = (~a & c & (~b | (b & d))) | (a & ~c & ~d) | (a & c & (b | d));
    s = (b & c & ~(a ^ d)) | (~b & (a ^ d)) | (a & b & ~c);
    t = e;
  end

endmodule
