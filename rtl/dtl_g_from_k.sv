// dtl_g_from_k -- G-element assembled from two K-elements.
//
// Function: a transition of x in either direction toggles z1 when d=1 and z2
// when d=0 -- the behaviour of the (non-directional) G-element.
//
// Insides: K1 takes x and d, K2 takes x and d inverted. The M-element M1
// merges K1's upward and downward outputs (X11 d + X12 d = X d) into z1, and
// M2 merges K2's (X11 d' + X12 d' = X d') into z2. Because each K-element
// keeps the two directions apart, the same network also offers the four
// directional products separately; they are brought out as wdir.
//
// Interface: clk (sampling clock of the K-elements' delay elements), preset
// (active high; hold for dtl_pkg::SETTLE_CYCLES edges with x=d=0), x, d;
// outputs z1, z2 and wdir = {X11 d, X12 d, X11 d', X12 d'} as levels.
// Timing: an output toggles on the first clk edge after the x transition.
// d must be steady across a transition of x.
module dtl_g_from_k
  import dtl_pkg::*;
(
  input  logic       clk,
  input  logic       preset,
  input  logic       x,
  input  logic       d,
  output logic       z1,
  output logic       z2,
  output logic [3:0] wdir
);

  kout_t k1, k2;

  dtl_kelem u_k1 (.clk, .preset, .x, .d(d),  .w(k1));
  dtl_kelem u_k2 (.clk, .preset, .x, .d(~d), .w(k2));

  dtl_melem #(.K(2)) u_m1 (.x({k1.w1, k1.w2}), .z(z1));
  dtl_melem #(.K(2)) u_m2 (.x({k2.w1, k2.w2}), .z(z2));

  assign wdir = {k1.w1, k1.w2, k2.w1, k2.w2};

endmodule
