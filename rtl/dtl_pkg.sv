// dtl_pkg -- shared types and constants of the directional transition logic
// (DTL) circuits.
//
// Every circuit in this library is an asynchronous, fundamental-mode machine
// whose delay elements (the ones placed in the state branches of the
// K-element) are realised as flip-flops on a free-running sampling clock.
// A circuit built this way settles within SETTLE_CYCLES clock edges of an
// input change; the environment must hold each input change at least that
// long before making the next one (the fundamental-mode condition). The value
// is this library's own: one edge for the K-element to respond, one for the
// state levels it produces to reach the level inputs of the other K-elements,
// and one for those K-elements to absorb the new level.
package dtl_pkg;

  localparam int unsigned SETTLE_CYCLES = 3;

  // The two outputs of a K-element. w1 toggles on every upward transition
  // of x taken while d=1, w2 on every downward one.
  typedef struct packed {
    logic w1;
    logic w2;
  } kout_t;

  // Direction of a transition on a transition input.
  typedef enum logic {
    DIR_UP   = 1'b0,   // upward, 0 -> 1  (X_i1 in the flow tables)
    DIR_DOWN = 1'b1    // downward, 1 -> 0 (X_i2 in the flow tables)
  } dir_e;

endpackage
