// Two-input Muller C-element with preset and clear, gate level.
//
// Same C-element as c_element (z = a&b | (a|b)&z) with two initialisation
// inputs, wired as in the design's gate-level drawing: clear is inverted and
// gates both product terms, preset enters the output OR directly.
//   z = preset | ~clear & (a&b | (a|b)&z)
// So clear forces z to 0, preset forces z to 1 (preset wins if both are
// high), and with both low the cell is a plain C-element. Preset and clear
// are level signals held for a "sufficiently long" reset period; there is no
// clock. The loop through z is the storage element and the combinational-loop
// warning on it stands.
module c_element_pc (
  input  logic a,
  input  logic b,
  input  logic preset,
  input  logic clear,
  output logic z
);

  logic nclear, both, any, hold;

  assign nclear = ~clear;
  assign both   = a & b & nclear;
  assign any    = a | b;
  assign hold   = any & z & nclear;
  assign z      = preset | both | hold;

endmodule
