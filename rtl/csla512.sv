// csla512: 512-bit carry-select adder built from latch-based 16-bit slices.
//
// The adder is a cascade of N_SLICES csla16 slices (32 for 512 bits). Each
// slice is a square-root carry-select adder with groups of 2, 2, 3, 4 and 5
// bits, the top group of the top slice covering bits 511:507. The carry out
// of slice k is the carry in of slice k+1, where it enters the slice's plain
// 2-bit ripple adder and then steers the slice's multiplexers.
// Every latch group shares one ripple adder between the two carry-select
// cases: the clock en is its carry in. In the high phase all groups compute
// a + b + 1 and latch it; in the low phase they compute a + b + 0 and the
// carry chain picks, group by group, the latched or the live result.
// Interface: a, b, cin must be held over one whole clock period; sum and cout
// are valid in the low phase of en of that period (one addition per clock
// cycle, combinational otherwise: there are no registers and no reset).
// The 16-bit slicing of the 512-bit adder is this implementation's reading
// of the design; the group structure inside a slice follows the design.
module csla512
  import csla_pkg::*;
#(
  parameter int unsigned N_SLICES = 32,
  localparam int unsigned WIDTH   = N_SLICES * SLICE_W
) (
  input  logic             en,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [N_SLICES:0] c;   // c[k] = carry into slice k

  assign c[0] = cin;
  assign cout = c[N_SLICES];

  for (genvar k = 0; k < N_SLICES; k++) begin : g_slice
    csla16 u_slice (
      .en  (en),
      .a   (a[k*SLICE_W +: SLICE_W]),
      .b   (b[k*SLICE_W +: SLICE_W]),
      .cin (c[k]),
      .sum (sum[k*SLICE_W +: SLICE_W]),
      .cout(c[k+1])
    );
  end

endmodule
