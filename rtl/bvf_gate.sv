// bvf_gate: 4x4 BVF gate, a pair of Feynman gates in one reversible cell.
//
// P = A, Q = A xor B, R = C, S = C xor D. With B = D = 0 it copies both A and
// C, which the converter uses to duplicate b5 and b4. Interface: single-bit
// inputs a..d and outputs p..s. Purely combinational, one gate delay.
module bvf_gate (
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
    q = a ^ b;
    r = c;
    s = c ^ d;
  end

endmodule
