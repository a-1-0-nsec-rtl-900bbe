// prefix_adder_chip: the adder test chip, with both proposed 32-bit adders
// side by side and the divide network that makes their speed observable.
//
//   u_adder_ci  prefix tree adder with the carry input folded into every tree
//               row (depth 2 + log2 N, carry-input fanout 1 + log2 N)
//   u_adder_lp  its low-power variant (same depth, carry-input fanout 3,
//               bit N-1 tree column and the G_0 cells of rows 3 and up removed)
//   u_div       per-oscillator divide-by-4, one-hot-enabled mux tree and a
//               common divide-by-1024, so the selected ring oscillator
//               appears on div_out at 1/4096 of its frequency
//
// On silicon each adder is closed into a ring oscillator through an AND gate
// driven by its enable, along with reference rings of 7 to 23 inverters used to
// measure that AND gate. Those rings are delay structures, not logic, so they
// are left outside: each adder has its own operand ports, and the ring outputs
// come back in on osc[] with the enables on osc_en[]. osc_en must be one-hot
// or zero; the same enables are meant to gate the rings.
//
// The adders are combinational; the dividers are clocked by the oscillator
// signals and reset asynchronously by rst_n. NOSC = 16 slots is this design's
// choice.
module prefix_adder_chip #(
  parameter int unsigned N    = 32,
  parameter int unsigned NOSC = 16
) (
  // Adder with the carry input incorporated into the tree
  input  logic [N-1:0]    a_ci,
  input  logic [N-1:0]    b_ci,
  input  logic            cin_ci,
  output logic [N-1:0]    sum_ci,
  output logic            cout_ci,
  output logic            ovf_ci,
  // Low-power variant
  input  logic [N-1:0]    a_lp,
  input  logic [N-1:0]    b_lp,
  input  logic            cin_lp,
  output logic [N-1:0]    sum_lp,
  output logic            cout_lp,
  output logic            ovf_lp,
  // Ring oscillator measurement path
  input  logic            rst_n,
  input  logic [NOSC-1:0] osc,
  input  logic [NOSC-1:0] osc_en,
  output logic            div_out
);
  prefix_adder_ci #(.N(N)) u_adder_ci (
    .a    (a_ci),
    .b    (b_ci),
    .cin  (cin_ci),
    .sum  (sum_ci),
    .cout (cout_ci),
    .ovf  (ovf_ci)
  );

  prefix_adder_lp #(.N(N)) u_adder_lp (
    .a    (a_lp),
    .b    (b_lp),
    .cin  (cin_lp),
    .sum  (sum_lp),
    .cout (cout_lp),
    .ovf  (ovf_lp)
  );

  divide_network #(.NOSC(NOSC)) u_div (
    .rst_n   (rst_n),
    .osc     (osc),
    .osc_en  (osc_en),
    .div_out (div_out)
  );
endmodule
