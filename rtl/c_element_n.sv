// N-input Muller C-element with preset and clear.
//
// The output goes to 1 when all N inputs are 1, to 0 when all N inputs are
// 0, and holds while they disagree. It extends the two-input gate structure
// of c_element_pc to N inputs:
//   z = preset | ~clear & (&a | (|a)&z)
// The design uses such wide C-elements in its completion detectors and, here,
// one per minterm of the self-timed logic block; the gate-level form for more
// than two inputs is this design's own generalisation. The loop through z is
// the storage element and the combinational-loop warning on it stands.
module c_element_n #(
  parameter int N = 2
) (
  input  logic [N-1:0] a,
  input  logic         preset,
  input  logic         clear,
  output logic         z
);

  logic nclear, all_one, any_one, hold;

  assign nclear  = ~clear;
  assign all_one = (&a) & nclear;
  assign any_one = (|a);
  assign hold    = any_one & z & nclear;
  assign z       = preset | all_one | hold;

endmodule
