// carry_op: the fundamental (associative) carry operator of the prefix tree.
//
//   (G_hi, T_hi) o (G_lo, T_lo) = (G_hi | T_hi & G_lo,  T_hi & T_lo)
// where hi covers bits m+1..j and lo covers bits i..m, giving bits i..j.
// Combinational, one AO / AND level. If lo already holds a resolved carry (T = 0)
// the result is that carry, which is why the same operator also appears
// as a carry cell.
module carry_op
  import prefix_pkg::*;
(
  input  gt_t hi,
  input  gt_t lo,
  output gt_t y
);
  assign y.g = hi.g | (hi.t & lo.g);
  assign y.t = hi.t & lo.t;
endmodule
