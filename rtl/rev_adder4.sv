// rev_adder4: 4-bit reversible ripple-carry adder made of four HNG gates.
//
// Bit i is an hng_gate with A = x[i], B = y[i], C = carry into bit i and the
// constant D = 0: its R output is sum[i] and its S output the carry into
// bit i+1. The carry out of bit 3 is the adder's cout. Each HNG also returns
// copies of its A and B inputs; these eight garbage outputs are brought out
// on `garbage` ({P,Q} of bit i in garbage[2i+1:2i]). The adder therefore has
// four constant inputs and eight garbage outputs, as a reversible 4-bit HNG
// adder should. The ripple-carry arrangement is this design's choice; it is
// the arrangement those counts imply.
// Interface: x, y, cin in; sum, cout, garbage out. Purely combinational,
// four HNG delays from cin to cout.
module rev_adder4 (
  input  logic [3:0] x,
  input  logic [3:0] y,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout,
  output logic [7:0] garbage
);

  logic [4:0] carry;

  assign carry[0] = cin;
  assign cout     = carry[4];

  for (genvar i = 0; i < 4; i++) begin : g_bit
    hng_gate u_hng (
      .a (x[i]),
      .b (y[i]),
      .c (carry[i]),
      .d (1'b0),
      .p (garbage[2*i]),
      .q (garbage[2*i+1]),
      .r (sum[i]),
      .s (carry[i+1])
    );
  end

endmodule
