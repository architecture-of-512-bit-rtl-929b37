// full_adder: one-bit full adder, the cell every adder in this design is built from.
//
// sum  = a ^ b ^ cin
// cout = a&b | b&cin | a&cin
// The adder is written through its propagate P = a ^ b and generate G = a & b
// terms (sum = P ^ cin, cout = G | P & cin), which gives the same function as
// the majority form above. Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p, g;

  always_comb begin
    p    = a ^ b;
    g    = a & b;
    sum  = p ^ cin;
    cout = g | (p & cin);
  end

endmodule
