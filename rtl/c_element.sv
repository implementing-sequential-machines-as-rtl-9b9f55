// Two-input Muller C-element, gate level.
//
// The output z goes to 1 when both inputs are 1, goes to 0 when both inputs
// are 0, and keeps its value while the inputs disagree. It is built, as in
// the design's gate-level drawing, from an AND of the inputs, an OR of the
// inputs ANDed with the fed-back output, and an OR that merges the two:
//   z = a&b | (a|b)&z
// There is no clock: the state is held by the feedback loop through z. That
// loop is the storage element, so the combinational-loop warning tools give
// for z is expected and stands. The initial value of z is whatever the loop
// powers up in; use c_element_pc where a defined start is needed.
module c_element (
  input  logic a,
  input  logic b,
  output logic z
);

  logic both, any, hold;

  assign both = a & b;
  assign any  = a | b;
  assign hold = any & z;
  assign z    = both | hold;

endmodule
