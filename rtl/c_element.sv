// Muller C-element with N inputs and an active-high reset.
//
// The output copies the inputs when they all agree (all 1 -> 1, all 0 -> 0)
// and otherwise keeps its previous value, as in the C-element truth table of
// the source design. It is the state-holding gate every other block of this
// design is built from. Reset forces the output to 0, which puts every
// dual-rail latch and function block into the EMPTY state.
//
// Timing: none; the output reacts to the inputs only. The hold behaviour is
// written as a latch on purpose: a C-element is a level-sensitive storage gate,
// so the latch reported by tools for this module is the intended circuit.
module c_element #(
  parameter int unsigned N = 2
) (
  input  logic         rst,
  input  logic [N-1:0] in,
  output logic         z
);
  always_latch begin
    if (rst)         z = 1'b0;
    else if (&in)    z = 1'b1;
    else if (~|in)   z = 1'b0;
  end
endmodule
