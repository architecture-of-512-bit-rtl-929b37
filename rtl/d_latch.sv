// d_latch: level-sensitive D latch with true and complement outputs.
//
// While en = 1 the latch is transparent and q follows d. When en falls to 0,
// q keeps the value d had just before the fall, until en rises again.
// The reference circuit is four NAND gates (two steering gates sharing the
// enable, and a cross-coupled pair); here the same behaviour is written as
// an always_latch, which synthesis maps to a latch cell. The latch inferred
// here is intended: storing a value across the low phase of the enable is the
// whole purpose of the cell, so the latch warning of lint tools stands.
// Once this cell is inlined into a larger module, Verilator's lint may report
// that the always_latch infers no latch; synthesis still maps it to a latch
// and simulation shows it holding, so that warning stands as well.
// The four-NAND origin and the enable behaviour follow the reference design;
// the behavioural coding is this implementation's choice.
module d_latch (
  input  logic en,
  input  logic d,
  output logic q,
  output logic qn
);

  always_latch begin
    if (en) q = d;
  end

  assign qn = ~q;

endmodule
