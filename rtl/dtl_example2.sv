// dtl_example2 -- eight-state asynchronous machine realised with K-elements.
//
// Function: two level inputs x1, x2 (one change at a time) and one level
// output z. The machine walks the eight stable states of its level flow
// table; with the state code y1 y2 y3 the transitions are
//   state 1 (000): x1 up -> 5 (010)      x2 up -> 2 (110)
//   state 2 (110): x1 up -> 3 (101)
//   state 3 (101): x1 down -> 4 (001)    x2 down -> 8 (100)
//   state 4 (001): x2 down -> 1 (000)
//   state 5 (010): x2 up -> 6 (111)
//   state 6 (111): x1 down -> 7 (011)    x2 down -> 8 (100)
//   state 7 (011): x2 down -> 1 (000)
//   state 8 (100): x1 down -> 1 (000)
// and z is 1 in state 4 only. In words: z rises when x2 and then x1 are
// raised and x1 is dropped first; it falls when x2 is dropped.
//
// Insides: five K-elements, four M-elements and level gates, realising
//   Y1 = X12 + X21
//   Y2 = X11 + X21 (y1' y2') + X22 y2
//   Y3 = X11 (y2 ^ y3) + X21 y2 + X22
//   Z  = X12 (y2 ^ y3) + X22 (y1' y2')
// K1 (x1, d = y2^y3 from two ANDs and an OR), K2 (x2, d = NOR(y1,y2)),
// K3 (x2, d = y2), K4 (x2, d = 1), K5 (x1, d = 1). M1 forms z, M2..M4 form
// the state levels y1..y3, which feed back into the level logic. Inputs that
// the flow table does not allow in a state ("don't care" entries) give an
// unspecified but hazard-free response.
//
// Interface: clk (sampling clock of the K-elements' delay elements), preset
// (active high; hold for dtl_pkg::SETTLE_CYCLES edges with x1=x2=0), x1, x2;
// outputs z and the state code y (y[2]=y1, y[1]=y2, y[0]=y3).
// Timing: z and y change on the first clk edge after an input transition.
// Inputs must be held for dtl_pkg::SETTLE_CYCLES edges between changes.
module dtl_example2
  import dtl_pkg::*;
(
  input  logic       clk,
  input  logic       preset,
  input  logic       x1,
  input  logic       x2,
  output logic       z,
  output logic [2:0] y
);

  logic  y1, y2, y3;
  logic  f_xor;    // y2 ^ y3, built from two AND gates and an OR gate
  logic  f_nor;    // y1' y2'
  kout_t k1, k2, k3, k4, k5;

  assign f_xor = (y2 & ~y3) | (~y2 & y3);
  assign f_nor = ~(y1 | y2);

  dtl_kelem u_k1 (.clk, .preset, .x(x1), .d(f_xor), .w(k1));  // X11(y2^y3), X12(y2^y3)
  dtl_kelem u_k2 (.clk, .preset, .x(x2), .d(f_nor), .w(k2));  // X21 y1'y2', X22 y1'y2'
  dtl_kelem u_k3 (.clk, .preset, .x(x2), .d(y2),    .w(k3));  // X21 y2, X22 y2
  dtl_kelem u_k4 (.clk, .preset, .x(x2), .d(1'b1),  .w(k4));  // X21, X22
  dtl_kelem u_k5 (.clk, .preset, .x(x1), .d(1'b1),  .w(k5));  // X11, X12

  dtl_melem #(.K(2)) u_m1 (.x({k1.w2, k2.w2}),        .z(z));
  dtl_melem #(.K(2)) u_m2 (.x({k5.w2, k4.w1}),        .z(y1));
  dtl_melem #(.K(3)) u_m3 (.x({k5.w1, k2.w1, k3.w2}), .z(y2));
  dtl_melem #(.K(3)) u_m4 (.x({k1.w1, k3.w1, k4.w2}), .z(y3));

  assign y = {y1, y2, y3};

endmodule
