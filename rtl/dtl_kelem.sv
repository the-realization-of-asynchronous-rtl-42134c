// dtl_kelem -- K-element, the directional transition level-multiplier.
//
// Function: x is a transition input and d a level input. While d=1, every
// upward transition of x toggles output w1 and every downward transition of
// x toggles output w2; while d=0 a transition of x changes neither output.
// At most one output changes per transition of x. Level d may change only
// while x is steady (fundamental mode), and a change of d alone never moves
// an output.
//
// Insides: the three-variable asynchronous level circuit of the document's
// gate-level realisation, with state code y1 y2 y3 (y2 = w1, y3 = w2) chosen
// so that every transition changes exactly one state variable:
//   Y1 = d' (x ^ w1 ^ w2)  + d y1        + y1 (x ^ w1 ^ w2)
//   Y2 = w1 (d x)'         + d x (y1^w2)' + w1 (y1^w2)'
//   Y3 = w2 (d x')'        + d x' (y1^w1) + w2 (y1^w1)
// The third product of each sum is the hazard-removing consensus term. The
// state-branch delay elements are the three flip-flops y1_q..y3_q on clk, so
// the next-state logic sees an input change before the state moves. As in the
// document's figure, the preset input forces w1 and w2 low after the delay
// elements; here it also forces y1 low, so that an element whose d is tied
// to 1 starts in the right state too. Holding preset for SETTLE_CYCLES
// edges with x=0 brings the element to its initial state (all zero). The
// flip-flops have no reset of their own.
//
// Interface: clk (sampling clock of the delay elements), preset (active
// high), x, d; output w (struct with w1, w2).
// Timing: an output toggles on the first clk edge after the x transition;
// y1 follows a change of d one edge after it. Inputs must be held for
// dtl_pkg::SETTLE_CYCLES edges between changes.
//
// The Y2/Y3 product terms follow the document's reduced flow table with its
// state assignment (the table decides where the printed equations disagree
// with it); realising the delays as flip-flops is this design's choice.
module dtl_kelem
  import dtl_pkg::*;
(
  input  logic  clk,
  input  logic  preset,
  input  logic  x,
  input  logic  d,
  output kout_t w
);

  logic y1_q, y2_q, y3_q;   // outputs of the three delay elements
  logic y1, w1, w2;         // fed-back state levels
  logic Y1, Y2, Y3;         // excitation
  logic dx, dxn;            // d.x and d.x'
  logic par;                // x ^ w1 ^ w2

  assign y1  = y1_q & ~preset;
  assign w1  = y2_q & ~preset;
  assign w2  = y3_q & ~preset;
  assign dx  = d & x;
  assign dxn = d & ~x;
  assign par = x ^ w1 ^ w2;

  always_comb begin
    Y1 = (~d & par) | (d & y1) | (y1 & par);
    Y2 = (w1 & ~dx) | (dx & ~(y1 ^ w2)) | (w1 & ~(y1 ^ w2));
    Y3 = (w2 & ~dxn) | (dxn & (y1 ^ w1)) | (w2 & (y1 ^ w1));
  end

  always_ff @(posedge clk) begin
    y1_q <= Y1;
    y2_q <= Y2;
    y3_q <= Y3;
  end

  assign w.w1 = w1;
  assign w.w2 = w2;

  // Only one output may respond to one transition of x.
  a_one_output: assert property (@(posedge clk) disable iff (preset)
    !($changed(w.w1) && $changed(w.w2)));

  // Fundamental mode: x and d never change between the same two edges.
  a_fundamental_mode: assert property (@(posedge clk) disable iff (preset)
    !($changed(x) && $changed(d)));

endmodule
