// prefix_adder_lp: low-power variant of the N-bit prefix tree adder with the carry
// input incorporated into the tree (default N = 32).
//
// Same bit cells, rows and delay as prefix_adder_ci, with fewer cells and shorter
// wires to the top bit:
//   - the carry out is taken from the neighbouring carry,
//       c_(N-1) = g_(N-1) | t_(N-1) & c_(N-2),
//     so the whole tree column of bit N-1 and the long cin wire to it go away;
//   - the first carry of every row from row 4 on (c_7, c_15, ... below N-1) is
//       c_(j-1) = G_(j/2)^(j-1) | T_(j/2)^(j-1) & c_(j/2-1),   j = 8, 16, ...
//     reusing the first carry of the previous row, so the G_0^7, G_0^15, ...
//     operators are removed.
// The carry input then drives only the carry cells of rows 1 to 3 (fanout 3).
// c_(N-2) is ready after log2(N) rows, so the carry out needs one more gate and
// settles together with the sum XORs: depth stays 2 + log2(N).
// For N = 32 the first-carry rule is applied to c_7 and c_15; c_31 follows the
// carry-out rule. ovf = c_(N-1) ^ c_(N-2) is this design's addition.
//
// Purely combinational: no clock, no reset.
module prefix_adder_lp
  import prefix_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic         ovf
);
  gt_t          gt [N];
  logic [N-1:0] p;
  logic [N-2:0] carry;
  gt_t          top_grp;

  for (genvar j = 0; j < N; j++) begin : g_bit
    gt_cell u_gt (.a(a[j]), .b(b[j]), .g(gt[j].g), .t(gt[j].t), .p(p[j]));
  end

  prefix_carry_tree #(.N(N), .LOW_POWER(1'b1)) u_tree (
    .gt      (gt),
    .cin     (cin),
    .carry   (carry),
    .top_grp (top_grp)
  );

  // Final carry from the bit's own (g, t) and the carry of bit N-2.
  carry_cell u_cout (.grp(top_grp), .c_lo(carry[N-2]), .c(cout));

  assign sum = p ^ {carry, cin};
  assign ovf = cout ^ carry[N-2];
endmodule
