// freq_divider: divides the frequency of clk_in by 2**STAGES.
//
// A STAGES-bit binary counter clocked by clk_in; its most significant bit is the
// output, so clk_out has a 50% duty cycle and toggles every 2**(STAGES-1) rising
// edges of clk_in. Used as the divide-by-4 in front of each ring oscillator
// (STAGES = 2) and the divide-by-1024 after the selection mux (STAGES = 10).
// A synchronous counter rather than a ripple chain of toggle flip-flops, and the
// active-low asynchronous reset, are this design's choices.
module freq_divider #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);
  logic [STAGES-1:0] count;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;
  end

  assign clk_out = count[STAGES-1];
endmodule
