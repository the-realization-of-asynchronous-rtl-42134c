// dtl_gelem -- G-element, the non-directional transition level-multiplier.
//
// Function: every transition of x, upward or downward, toggles output z1
// when the level input d is 1 and output z2 when d is 0. Exactly one output
// moves per transition of x, so in every stable state x = z1 ^ z2 (all
// three start at 0). This element is used here only as a building part of
// the K-element-from-G-elements network.
//
// Insides: the document gives the element's level flow table and its
// transition equations Z1 = X d, Z2 = X d', not a gate circuit. This module
// is the simplest circuit with that behaviour: two state flip-flops, the
// outputs themselves, and the detector x ^ z1 ^ z2 which is 1 exactly when x
// has made a transition the outputs have not yet answered. The flip-flops
// play the part of the state-branch delay elements.
//
// Interface: clk (sampling clock), preset (active high, synchronous, clears
// both outputs; x must be 0 while it is held), x, d; outputs z1, z2.
// Timing: an output toggles on the first clk edge after the x transition.
// d must be steady across the transition of x.
module dtl_gelem (
  input  logic clk,
  input  logic preset,
  input  logic x,
  input  logic d,
  output logic z1,
  output logic z2
);

  logic pending;   // x has changed and no output has answered yet

  assign pending = x ^ z1 ^ z2;

  always_ff @(posedge clk) begin
    if (preset) begin
      z1 <= 1'b0;
      z2 <= 1'b0;
    end else begin
      z1 <= z1 ^ (pending & d);
      z2 <= z2 ^ (pending & ~d);
    end
  end

endmodule
