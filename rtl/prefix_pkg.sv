// prefix_pkg: types and elaboration-time helpers shared by the prefix tree adders.
//
// A tree node carries a group generate/transmit pair (G_i^j, T_i^j) for bits i..j.
// The primary carry input is treated as an extra bit -1 with g = cin, t = 0, so a
// node whose group reaches down to bit -1 holds a resolved carry and T = 0.
//
// cell_kind() decides, for every row k (1..log2 N) and bit column j of the tree,
// which cell sits there:
//   CELL_OP    fundamental carry operator: (G,T) o (G,T) of the column "dist" below
//   CELL_CARRY carry cell: c_j = G + T & c of the column "dist" below
//   CELL_BUF   buffer: the node passes straight down
// Row k of the Fig. 9 style adder (LOW_POWER = 0):
//   j <  2^(k-1)-1            buffer (carry already resolved)
//   2^(k-1)-1 <= j < 2^k-1    carry cell, lower carry from column j-2^(k-1)
//   j >= 2^k-1                operator, lower group from column j-2^(k-1)
// The low-power (Fig. 10 style) tree differs in three ways:
//   column N-1 is only buffers; its carry is g + t & c_(N-2) after the tree,
//   the operator at column 2^k-1 of rows k >= 3 (the G_0^(2^k-1) cells) is removed,
//   the first carry of rows k >= 4, column j = 2^(k-1)-1, is c_j = G_((j+1)/2)^j
//   + T & c_((j+1)/2-1), so its lower carry is at distance 2^(k-2).
// This package is this design's own way of writing the cell placement rules down.
package prefix_pkg;

  typedef struct packed {
    logic g;  // group generate
    logic t;  // group transmit
  } gt_t;

  typedef enum logic [1:0] {
    CELL_BUF   = 2'd0,
    CELL_OP    = 2'd1,
    CELL_CARRY = 2'd2
  } cell_kind_e;

  // ceil(log2(n)) for n >= 1
  function automatic int unsigned clog2(input int unsigned n);
    int unsigned r;
    r = 0;
    while ((32'd1 << r) < n) r++;
    return r;
  endfunction

  function automatic cell_kind_e cell_kind(input int n, input int k, input int j,
                                           input bit low_power);
    int half;
    int full;
    half = 1 << (k - 1);
    full = 1 << k;
    if (low_power) begin
      if (j == n - 1) return CELL_BUF;
      if (k >= 4 && j == half - 1) return CELL_CARRY;
      if (k >= 3 && j == full - 1) return CELL_BUF;
    end
    if (j < half - 1) return CELL_BUF;
    if (j < full - 1) return CELL_CARRY;
    return CELL_OP;
  endfunction

  // Distance from column j down to the column that supplies the lower operand.
  function automatic int cell_dist(input int k, input int j, input bit low_power);
    if (low_power && k >= 4 && j == (1 << (k - 1)) - 1) return 1 << (k - 2);
    return 1 << (k - 1);
  endfunction

endpackage
