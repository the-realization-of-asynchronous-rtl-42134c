// dtl_k_from_g -- K-element assembled from two G-elements.
//
// Function: the K-element's behaviour (while d=1, an upward transition of x
// toggles w1 and a downward one toggles w2; nothing happens while d=0)
// obtained from non-directional G-elements.
//
// Insides: the reduced transition flow table of the K-element has four
// states coded by y1 = d and y2 = d ^ x (an M-element of d and x), and its
// outputs are W1 = X y1 y2 and W2 = X y1 y2'. G1 takes x with level input
// y1 y2 and gives w1 on its d=1 output; G2 takes x with level input y1 y2'
// and gives w2. The two state variables are held in flip-flops (the
// state-branch delay elements), so the level inputs of G1 and G2 still hold
// the values from before a transition of x when the G-elements answer it --
// in the flow table the output is a function of the present state, not of
// the state the transition leads to. The other output of each G-element is
// left open.
//
// Interface: clk (sampling clock of the delay elements), preset (active
// high; hold for dtl_pkg::SETTLE_CYCLES edges with x=d=0), x, d; output w
// (struct with w1, w2).
// Timing: an output toggles on the first clk edge after the x transition.
// d must be steady across a transition of x and held for
// dtl_pkg::SETTLE_CYCLES edges after it changes.
module dtl_k_from_g
  import dtl_pkg::*;
(
  input  logic  clk,
  input  logic  preset,
  input  logic  x,
  input  logic  d,
  output kout_t w
);

  logic m;            // M-element output, d ^ x
  logic y1_q, y2_q;   // delayed state variables y1 = d, y2 = d ^ x
  logic g1_z2, g2_z2; // open outputs of G1 and G2

  dtl_melem #(.K(2)) u_m (.x({d, x}), .z(m));

  always_ff @(posedge clk) begin
    if (preset) begin
      y1_q <= 1'b0;
      y2_q <= 1'b0;
    end else begin
      y1_q <= d;
      y2_q <= m;
    end
  end

  dtl_gelem u_g1 (.clk, .preset, .x, .d(y1_q & y2_q),  .z1(w.w1), .z2(g1_z2));
  dtl_gelem u_g2 (.clk, .preset, .x, .d(y1_q & ~y2_q), .z1(w.w2), .z2(g2_z2));

  logic unused;
  assign unused = g1_z2 ^ g2_z2;

endmodule
