// csla16: 16-bit square-root carry-select adder using D latches.
//
// The slice is split into five groups of growing width (see csla_pkg):
//   group 0, bits  1:0  : a plain 2-bit ripple carry adder fed by cin
//   group 1, bits  3:2  : latch_csla_group, W = 2
//   group 2, bits  6:4  : latch_csla_group, W = 3
//   group 3, bits 10:7  : latch_csla_group, W = 4
//   group 4, bits 15:11 : latch_csla_group, W = 5
// The carry out of each group selects the result of the next one. Groups 1-4
// each compute their carry-in-1 result while en is high and store it in
// latches, then compute the carry-in-0 result while en is low; meanwhile the
// carry from below picks one of the two.
// Timing: a, b and cin are held for one whole clock period; sum and cout are
// valid during the low phase of en in that same period, after the carry has
// passed through group 0 and four multiplexer stages. cout is not valid while
// en is high.
module csla16
  import csla_pkg::*;
(
  input  logic                 en,    // clock of the latch groups
  input  logic [SLICE_W-1:0]   a,
  input  logic [SLICE_W-1:0]   b,
  input  logic                 cin,
  output logic [SLICE_W-1:0]   sum,
  output logic                 cout
);

  logic [N_GROUPS:0] c;   // c[g] = carry into group g

  assign c[0] = cin;
  assign cout = c[N_GROUPS];

  rca #(.W(GROUP_W[0])) u_group0 (
    .a   (a[GROUP_LSB[0] +: GROUP_W[0]]),
    .b   (b[GROUP_LSB[0] +: GROUP_W[0]]),
    .cin (c[0]),
    .sum (sum[GROUP_LSB[0] +: GROUP_W[0]]),
    .cout(c[1])
  );

  for (genvar g = 1; g < N_GROUPS; g++) begin : g_group
    latch_csla_group #(.W(GROUP_W[g])) u_group (
      .en  (en),
      .a   (a[GROUP_LSB[g] +: GROUP_W[g]]),
      .b   (b[GROUP_LSB[g] +: GROUP_W[g]]),
      .sel (c[g]),
      .sum (sum[GROUP_LSB[g] +: GROUP_W[g]]),
      .cout(c[g+1])
    );
  end

endmodule
