// latch_csla_group: one W-bit group of the latch-based carry-select adder.
//
// A conventional carry-select group has two ripple adders, one computing with
// carry in 0 and one with carry in 1. Here a single W-bit ripple adder does
// both, one after the other: its carry in is the clock/enable en.
//   en = 1: the ripple adder computes a + b + 1. The W+1 D latches (W sum
//           bits and the carry) are transparent and take that result.
//   en = 0: the latches hold the a + b + 1 result while the ripple adder now
//           computes a + b + 0. W+1 2:1 multiplexers, all selected by the
//           carry sel coming from the group below, pass the latched result
//           (sel = 1) or the live ripple-adder result (sel = 0).
// Timing: a, b and sel must be stable over a whole clock cycle; sum and cout
// are valid during the low phase of en. During the high phase the outputs are
// not meaningful (with sel = 0 they show a + b + 1). The design relies on the
// ripple adder being slower than the latch closes when en falls, so that the
// latches keep the carry-in-1 result; a zero-delay simulation behaves so.
module latch_csla_group #(
  parameter int unsigned W = 2
) (
  input  logic         en,    // clock: high phase = carry in 1, low phase = carry in 0
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sel,   // carry out of the group below
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] rca_sum;
  logic         rca_cout;
  logic [W:0]   live;       // {cout, sum} of the ripple adder in the current phase
  logic [W:0]   held;       // latched {cout, sum} of the carry-in-1 addition

  rca #(.W(W)) u_rca (
    .a   (a),
    .b   (b),
    .cin (en),
    .sum (rca_sum),
    .cout(rca_cout)
  );

  assign live = {rca_cout, rca_sum};

  for (genvar i = 0; i <= W; i++) begin : g_latch
    logic qn_unused;
    d_latch u_latch (
      .en(en),
      .d (live[i]),
      .q (held[i]),
      .qn(qn_unused)
    );
  end

  // Output multiplexers: latched carry-in-1 result or live carry-in-0 result.
  always_comb begin
    if (sel) {cout, sum} = held;
    else     {cout, sum} = live;
  end

endmodule
