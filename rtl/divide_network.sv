// divide_network: brings one on-chip ring oscillator out at a frequency a
// scope can follow.
//
// Each oscillator first goes through its own divide-by-2**PRE_STAGES (4), which
// gives the mux tree time to switch; osc_mux_tree then selects the oscillator
// whose enable is set, and a common divide-by-2**POST_STAGES (1024) follows.
// div_out therefore runs at f_osc / 2**(PRE_STAGES+POST_STAGES) = f_osc / 4096.
// The same enables also gate the oscillators themselves (outside this block).
// The 4 and 1024 ratios and the divide/mux/divide order follow the test-chip
// description; NOSC = 16, the reset and the counter style are this design's.
//
// Interface: osc[i] is oscillator i, osc_en one-hot, rst_n async active low.
// After rst_n rises, the first div_out rising edge comes 2**(PRE+POST-1) periods
// of the selected oscillator later.
module divide_network #(
  parameter int unsigned NOSC        = 16,
  parameter int unsigned PRE_STAGES  = 2,
  parameter int unsigned POST_STAGES = 10
) (
  input  logic            rst_n,
  input  logic [NOSC-1:0] osc,
  input  logic [NOSC-1:0] osc_en,
  output logic            div_out
);
  logic [NOSC-1:0] pre_div;
  logic            selected;

  for (genvar i = 0; i < NOSC; i++) begin : g_pre
    freq_divider #(.STAGES(PRE_STAGES)) u_pre (
      .clk_in  (osc[i]),
      .rst_n   (rst_n),
      .clk_out (pre_div[i])
    );
  end

  osc_mux_tree #(.NOSC(NOSC)) u_mux (
    .in  (pre_div),
    .en  (osc_en),
    .out (selected)
  );

  freq_divider #(.STAGES(POST_STAGES)) u_post (
    .clk_in  (selected),
    .rst_n   (rst_n),
    .clk_out (div_out)
  );
endmodule
