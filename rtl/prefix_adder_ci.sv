// prefix_adder_ci: N-bit radix-2 prefix tree adder with the carry input
// incorporated into the prefix trees (default N = 32).
//
// Step 1  gt_cell per bit: g = a&b, t = a|b, p = a^b.
// Step 2  log2(N) rows of prefix_carry_tree. In row k the carries of bits
//         2^(k-1)-1 .. 2^k-2 are resolved as c_j = G + T & c_(j-2^(k-1)), using
//         the carry input or a lower carry resolved in an earlier row, while the
//         remaining columns double their group span. The carry input feeds
//         one carry cell in every row.
// Step 3  in parallel: cout = c_(N-1) = G_0^(N-1) | T_0^(N-1) & cin, and
//         s_j = p_j ^ c_(j-1) with c_(-1) = cin.
// Logic depth is 2 + log2(N) gate levels from a/b to sum/cout, one level less
// than applying cin in a row after a plain prefix tree; the carry input has a
// fanout of 1 + log2(N). All of this follows the described architecture.
// ovf = c_(N-1) ^ c_(N-2) flags two's complement overflow; bringing it out as a
// port is this design's choice.
//
// Purely combinational: no clock, no reset.
module prefix_adder_ci
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

  prefix_carry_tree #(.N(N), .LOW_POWER(1'b0)) u_tree (
    .gt      (gt),
    .cin     (cin),
    .carry   (carry),
    .top_grp (top_grp)
  );

  // Final carry: the whole-word group combined with the carry input.
  carry_cell u_cout (.grp(top_grp), .c_lo(cin), .c(cout));

  assign sum = p ^ {carry, cin};
  assign ovf = cout ^ carry[N-2];
endmodule
