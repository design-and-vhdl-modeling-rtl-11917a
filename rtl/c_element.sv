// c_element: Muller C-element with WIDTH inputs, the heart of the reset logic
// of the bang-bang PFD.
//
// The output rises when every input is high, falls when every input is low and
// otherwise keeps its value. It is written as a level-sensitive latch whose
// enable is "all inputs agree" and whose data is any one input; the latch is the
// state-holding node of the gate and is intended. Unlike a plain AND gate the
// output stays asserted until all inputs have returned low, so every element it
// resets has finished resetting before it lets go. No clock; the output follows
// its inputs combinationally.
module c_element #(
  parameter int unsigned WIDTH = 3
) (
  input  logic [WIDTH-1:0] in,
  output logic             out
);
  timeunit 1ps;
  timeprecision 1fs;

  always_latch begin
    if ((&in) || !(|in)) out = in[0];
  end

endmodule
