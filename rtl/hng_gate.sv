// hng_gate: 4x4 HNG reversible gate.
//
// P = A, Q = B, R = A xor B xor C, S = ((A xor B) and C) xor (A and B) xor D.
// With D = 0 it is a full adder: R is the sum of A, B and C, S the carry out;
// P and Q are then garbage outputs. Interface: single-bit inputs a..d and
// outputs p..s. Purely combinational, one gate delay.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  always_comb begin
    p = a;
    q = b;
    r = a ^ b ^ c;
    s = ((a ^ b) & c) ^ (a & b) ^ d;
  end

endmodule
