// fg_gate: 2x2 Feynman gate (controlled NOT).
//
// P = A, Q = A xor B. With B tied to 0 the gate makes a second copy of A,
// which is how the converter fans out input bit b6 without a wire fanout.
// Interface: single-bit inputs a, b and outputs p, q. Purely combinational,
// one gate delay. The gate function is the standard published one.
module fg_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule
