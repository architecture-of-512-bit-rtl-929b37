// rca: W-bit ripple carry adder.
//
// A chain of W full adders; the carry out of bit i is the carry in of bit
// i+1, so the carry ripples from bit 0 to bit W-1. Outputs are the W sum bits
// and the carry out of the top bit. Purely combinational; the delay grows
// linearly with W. The default width of 4 is the size of the example ripple
// adder in the design description; the carry-select adder uses 2 to 5 bits.
module rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;
  assign cout = c[W];

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

endmodule
