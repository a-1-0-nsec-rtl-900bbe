// adder_ring_osc_model: timed simulation model of an adder ring oscillator
// (behavioural, for testbenches only).
//
// With a = all ones and b = 0 the adder's top sum bit is the inverse of its
// carry input, and the path from cin to s[N-1] runs through every row of the
// carry tree. Feeding s[N-1] back to cin through an AND gate with the enable
// closes an inverting loop: while en is high it oscillates with half period
// T_ADD + T_AND, while en is low it rests with cin = 0. The adder itself is the
// zero-delay RTL outside this model; T_ADD stands for its propagation delay.
//
// Ports: drive a/b/cin of the adder under test, read back its top sum bit,
// osc is the ring signal handed to the divide network.
module adder_ring_osc_model #(
  parameter int unsigned N     = 32,
  parameter realtime     T_ADD = 1.0ns,   // adder delay
  parameter realtime     T_AND = 0.38ns   // enable AND gate delay
) (
  input  logic         en,
  input  logic         s_msb,
  output logic [N-1:0] a,
  output logic [N-1:0] b,
  output logic         cin,
  output logic         osc
);
  timeunit 1ns;
  timeprecision 1ps;

  logic s_late;

  assign a = '1;
  assign b = '0;
  assign #(T_ADD) s_late = s_msb;
  assign #(T_AND) cin = en & s_late;
  assign osc = cin;
endmodule
