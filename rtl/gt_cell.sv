// gt_cell: bit-level generate / transmit / propagate cell (the squares on top of
// the prefix tree).
//
//   g = a & b   carry generated in this bit
//   t = a | b   carry transmitted through this bit (an OR is faster than an XOR,
//               so the tree is fed with t rather than p)
//   p = a ^ b   propagate, used only by the final sum XOR
// Purely combinational, one gate level. The equations follow the adder
// definition with transmit signals; the transistor-level XOR style is not modelled.
module gt_cell (
  input  logic a,
  input  logic b,
  output logic g,
  output logic t,
  output logic p
);
  assign g = a & b;
  assign t = a | b;
  assign p = a ^ b;
endmodule
