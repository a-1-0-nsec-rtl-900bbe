// carry_cell: carry resolution cell (the crossed circles of the tree).
//
//   c = G | T & c_lo
// grp is the group (G_i^j, T_i^j) ending at this bit and c_lo is the carry out of
// bit i-1 (the primary carry input when i = 0). This is how the primary carry
// and the low-order carries enter the tree instead of being added in a
// separate row after it. Combinational, one AO gate level.
module carry_cell
  import prefix_pkg::*;
(
  input  gt_t  grp,
  input  logic c_lo,
  output logic c
);
  assign c = grp.g | (grp.t & c_lo);
endmodule
