// inv_ring_osc_model: timed simulation model of a reference ring of NINV
// inverters closed through the enable AND gate (behavioural, for testbenches
// only). Half period = NINV * T_INV + T_AND while en is high; osc rests at 0
// while en is low.
module inv_ring_osc_model #(
  parameter int unsigned NINV  = 7,
  parameter realtime     T_INV = 0.05ns,
  parameter realtime     T_AND = 0.38ns
) (
  input  logic en,
  output logic osc
);
  timeunit 1ns;
  timeprecision 1ps;

  logic chain_out;

  assign #(NINV * T_INV) chain_out = ~osc;  // odd chain: one net inversion
  assign #(T_AND) osc = en & chain_out;
endmodule
