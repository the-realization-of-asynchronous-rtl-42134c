// dtl_mod4_counter -- modulo-four up/down counter built from K-elements.
//
// Function: two push-button inputs x1 and x2, never pressed together. Each
// press of x1 (x1 goes 1 and back to 0) advances the two-bit count {z1,z2}
// by one, 0-1-2-3-0; each press of x2 decreases it, 0-3-2-1-0. The count is
// updated on the press (upward transition) of the button.
//
// Insides: the directional-transition realisation with four K-elements,
// three M-elements and one inverter. With X11/X12 the upward/downward
// transitions of x1 and X21/X22 those of x2, the state variable y2 and the
// outputs obey
//   Y2 = X12 + X21,   Z1 = X11 y2 + X21 y2',   Z2 = X11 + X21
// (a "+" of transitions is an M-element, a product with a level is the d
// input of a K-element). K1 (x1, d=y2) and K2 (x2, d=y2') give the two terms
// of Z1; K3 (x2, d=1) and K4 (x1, d=1) give X21, X11 and X12. M1 forms y2,
// M2 forms z2 and M3 forms z1. The second state variable of the document's
// state assignment, y1, follows x2 (Y1 = X2) and is used by no function, so,
// as in the document's circuit, it is not built.
//
// Interface: clk (sampling clock of the K-elements' delay elements), preset
// (active high; hold for dtl_pkg::SETTLE_CYCLES edges with x1=x2=0), x1, x2;
// outputs z1 (count bit 1), z2 (count bit 0).
// Timing: the count changes on the first clk edge after x1 or x2 rises. The
// inputs must be held for dtl_pkg::SETTLE_CYCLES edges between changes.
module dtl_mod4_counter
  import dtl_pkg::*;
(
  input  logic clk,
  input  logic preset,
  input  logic x1,
  input  logic x2,
  output logic z1,
  output logic z2
);

  logic  y2;
  kout_t k1, k2, k3, k4;

  dtl_kelem u_k1 (.clk, .preset, .x(x1), .d(y2),   .w(k1));  // X11 y2
  dtl_kelem u_k2 (.clk, .preset, .x(x2), .d(~y2),  .w(k2));  // X21 y2'
  dtl_kelem u_k3 (.clk, .preset, .x(x2), .d(1'b1), .w(k3));  // X21, X22
  dtl_kelem u_k4 (.clk, .preset, .x(x1), .d(1'b1), .w(k4));  // X11, X12

  dtl_melem #(.K(2)) u_m1 (.x({k4.w2, k3.w1}), .z(y2));      // Y2 = X12 + X21
  dtl_melem #(.K(2)) u_m2 (.x({k4.w1, k3.w1}), .z(z2));      // Z2 = X11 + X21
  dtl_melem #(.K(2)) u_m3 (.x({k1.w1, k2.w1}), .z(z1));      // Z1

  // Unused K-element outputs: the downward-transition outputs of K1, K2 and
  // K3 (the last one would drive y1, which nothing reads).
  logic unused;
  assign unused = k1.w2 ^ k2.w2 ^ k3.w2;

endmodule
