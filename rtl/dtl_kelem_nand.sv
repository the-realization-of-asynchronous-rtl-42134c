// dtl_kelem_nand -- K-element in its NAND / wired-or gate structure.
//
// Function: identical to dtl_kelem. While d=1, an upward transition of x
// toggles w1 and a downward one toggles w2; while d=0, and whenever d alone
// changes, nothing happens.
//
// Insides: the same excitation functions rearranged so that the w1 and w2
// halves are mirror images built from NAND gates, with y the parity-memory
// state variable:
//   w1' = NAND( NAND(dx, (y^w2)'), NAND(w1, (dx)'), NAND(w1, (y^w2)') )
//   w2' = NAND( NAND(dx', y^w1),   NAND(w2, (dx')'), NAND(w2, y^w1) )
//   Y   = d' (x^w1^w2) + y (d + (x^w1^w2))
// Here dx = d.x and dx' = d.x'. In this structure the delay elements sit
// after the final NAND of each w half (the feedback paths of w1 and w2) and
// in the y branch; here they are flip-flops on clk. Preset acts ahead of the
// delays: while it is high the next values of w1, w2 and y are 0, so the
// element clears on the first edge of preset. Hold preset for
// dtl_pkg::SETTLE_CYCLES edges with x=0.
//
// The gate arrangement follows the document's wired-or realisation; the Y
// function is the one of the element's flow table (same as dtl_kelem), the
// preset polarity follows the form in which preset forces the outputs to 0,
// and clearing y as well is this design's choice.
//
// Interface: clk, preset (active high), x, d; output w (struct w1, w2).
// Timing: an output toggles on the first clk edge after the x transition;
// inputs must be held for dtl_pkg::SETTLE_CYCLES edges between changes.
module dtl_kelem_nand
  import dtl_pkg::*;
(
  input  logic  clk,
  input  logic  preset,
  input  logic  x,
  input  logic  d,
  output kout_t w
);

  logic y_q, w1_q, w2_q;     // delay elements: y branch and w feedback paths
  logic dx, dxn, a1, a2, par;
  logic n11, n12, n13, n21, n22, n23;
  logic w1_next, w2_next, y_next;

  assign dx  = d & x;
  assign dxn = d & ~x;
  assign a1  = ~(y_q ^ w2_q);    // XOR followed by an inverter
  assign a2  = y_q ^ w1_q;
  assign par = x ^ w1_q ^ w2_q;

  always_comb begin
    n11 = ~(dx & a1);
    n12 = ~(w1_q & ~dx);
    n13 = ~(w1_q & a1);
    n21 = ~(dxn & a2);
    n22 = ~(w2_q & ~dxn);
    n23 = ~(w2_q & a2);
    w1_next = ~preset & ~(n11 & n12 & n13);
    w2_next = ~preset & ~(n21 & n22 & n23);
    y_next  = ~preset & ((~d & par) | (y_q & (d | par)));
  end

  always_ff @(posedge clk) begin
    y_q  <= y_next;
    w1_q <= w1_next;
    w2_q <= w2_next;
  end

  assign w.w1 = w1_q;
  assign w.w2 = w2_q;

  a_one_output: assert property (@(posedge clk) disable iff (preset)
    !($changed(w.w1) && $changed(w.w2)));

  a_fundamental_mode: assert property (@(posedge clk) disable iff (preset)
    !($changed(x) && $changed(d)));

endmodule
