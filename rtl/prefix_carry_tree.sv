// prefix_carry_tree: radix-2 full prefix (one tree per bit) carry network with the
// primary carry input folded into the trees.
//
// Row 0 holds the bit-level (g_j, t_j) pairs plus the carry input as an extra
// column for bit -1, (cin, 0). Each of the log2(N) rows places, per column, a
// fundamental carry operator, a carry cell or a buffer, as chosen by
// prefix_pkg::cell_kind(). Low-order carries are produced inside the tree and
// are reused by the rows below, so c_j for 0 <= j <= N-2 leaves the tree after
// log2(N) rows and no extra "apply cin" row is needed.
//
// LOW_POWER = 0 gives the full tree (its column N-1 ends with G_0^(N-1)),
// LOW_POWER = 1 the reduced tree (column N-1 only buffers, g_(N-1), t_(N-1)).
// The enclosing adder forms the carry out from top_grp.
//
// Interface: combinational, gt[j] = (g_j, t_j), carry[j] = c_j for j < N-1.
// Timing: log2(N) operator levels from gt to carry and top_grp.
module prefix_carry_tree
  import prefix_pkg::*;
#(
  parameter int unsigned N         = 32,
  parameter bit          LOW_POWER = 1'b0
) (
  input  gt_t          gt [N],
  input  logic         cin,
  output logic [N-2:0] carry,
  output gt_t          top_grp
);
  localparam int unsigned L = clog2(N);

  initial begin
    assert (N >= 2 && (1 << L) == N)
      else $error("prefix_carry_tree: N must be a power of two, at least 2");
  end

  // One node array per row; column c of a row is bit c-1, column 0 is the
  // carry input (bit -1).
  for (genvar k = 0; k <= L; k++) begin : g_row
    gt_t node [N+1];
    if (k == 0) begin : g_in
      assign node[0] = '{g: cin, t: 1'b0};
      for (genvar j = 0; j < N; j++) begin : g_col
        assign node[j+1] = gt[j];
      end
    end else begin : g_cells
      assign node[0] = g_row[k-1].node[0];
      for (genvar j = 0; j < N; j++) begin : g_col
        localparam cell_kind_e KIND = cell_kind(N, k, j, LOW_POWER);
        localparam int         DIST = cell_dist(k, j, LOW_POWER);
        if (KIND == CELL_OP) begin : g_op
          carry_op u_op (
            .hi (g_row[k-1].node[j+1]),
            .lo (g_row[k-1].node[j+1-DIST]),
            .y  (node[j+1])
          );
        end else if (KIND == CELL_CARRY) begin : g_carry
          logic c;
          carry_cell u_carry (
            .grp  (g_row[k-1].node[j+1]),
            .c_lo (g_row[k-1].node[j+1-DIST].g),
            .c    (c)
          );
          assign node[j+1] = '{g: c, t: 1'b0};
        end else begin : g_buf
          assign node[j+1] = g_row[k-1].node[j+1];
        end
      end
    end
  end

  for (genvar j = 0; j < N - 1; j++) begin : g_out
    assign carry[j] = g_row[L].node[j+1].g;
  end
  assign top_grp = g_row[L].node[N];

endmodule
