// csla_pkg: shared constants of the latch-based square-root carry-select adder.
//
// A 16-bit slice is split into five groups of 2, 2, 3, 4 and 5 bits
// (bits 1:0, 3:2, 6:4, 10:7 and 15:11). The lowest group is a plain ripple
// carry adder; every other group is a latch-based carry-select group. The wide
// adder is a cascade of such slices. The group sizes and bit ranges follow the
// design; putting them in a package is this implementation's choice.
package csla_pkg;

  localparam int unsigned SLICE_W  = 16;  // bits per carry-select slice
  localparam int unsigned N_GROUPS = 5;   // groups per slice

  // Width and lowest bit of each group inside a slice, group 0 first.
  localparam int unsigned GROUP_W   [N_GROUPS] = '{2, 2, 3, 4, 5};
  localparam int unsigned GROUP_LSB [N_GROUPS] = '{0, 2, 4, 7, 11};

endpackage
