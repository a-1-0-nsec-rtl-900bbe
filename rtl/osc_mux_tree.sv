// osc_mux_tree: binary tree of 2:1 muxes that forwards one of NOSC signals to a
// single output, steered directly by one enable per input.
//
// Row l of the tree has NOSC/2**l muxes. A mux picks its upper input when any
// enable under that upper subtree is set, so with exactly one enable set the
// enabled input reaches the output through log2(NOSC) muxes; with none set the
// output follows input 0. Enables must be one-hot or all zero (asserted).
// Combinational. The tree shape and the steering by OR-ed enables are this
// design's reading of "a mux tree with separate enables".
module osc_mux_tree #(
  parameter int unsigned NOSC = 16
) (
  input  logic [NOSC-1:0] in,
  input  logic [NOSC-1:0] en,
  output logic            out
);
  localparam int unsigned LEVELS = $clog2(NOSC);

  initial begin
    assert (NOSC >= 2 && (1 << LEVELS) == NOSC)
      else $error("osc_mux_tree: NOSC must be a power of two, at least 2");
  end

  always_comb begin
    assert ($onehot0(en)) else $error("osc_mux_tree: more than one enable set: %b", en);
  end

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic [(NOSC >> l)-1:0] node;
    if (l == 0) begin : g_leaf
      assign node = in;
    end else begin : g_mux
      localparam int unsigned SPAN = 1 << (l - 1);  // inputs under one mux leg
      for (genvar i = 0; i < (NOSC >> l); i++) begin : g_node
        wire sel_hi = |en[(2*i+1)*SPAN +: SPAN];
        assign node[i] = sel_hi ? g_lvl[l-1].node[2*i+1] : g_lvl[l-1].node[2*i];
      end
    end
  end

  assign out = g_lvl[LEVELS].node[0];
endmodule
