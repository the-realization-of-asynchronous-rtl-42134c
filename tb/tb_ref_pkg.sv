// tb_ref_pkg -- reference models shared by the testbenches.
//
// Written from the flow tables, independently of the circuits under test:
// the eight-state machine of dtl_example2 as a table of stable states and
// their allowed input transitions, with the state code y1 y2 y3 of its
// secondary assignment.
package tb_ref_pkg;

  // Next stable state of the example-2 machine when input `inp` (0 = x1,
  // 1 = x2) makes a transition in direction `down` (0 = upward). Returns 0
  // when the flow table has no entry (the change is not allowed).
  function automatic int ex2_next(int state, int inp, bit down);
    case ({state[3:0], inp[0], down})
      {4'd1, 1'b0, 1'b0}: return 5;
      {4'd1, 1'b1, 1'b0}: return 2;
      {4'd2, 1'b0, 1'b0}: return 3;
      {4'd3, 1'b0, 1'b1}: return 4;
      {4'd3, 1'b1, 1'b1}: return 8;
      {4'd4, 1'b1, 1'b1}: return 1;
      {4'd5, 1'b1, 1'b0}: return 6;
      {4'd6, 1'b0, 1'b1}: return 7;
      {4'd6, 1'b1, 1'b1}: return 8;
      {4'd7, 1'b1, 1'b1}: return 1;
      {4'd8, 1'b0, 1'b1}: return 1;
      default:            return 0;
    endcase
  endfunction

  // State code {y1, y2, y3} of each state.
  function automatic logic [2:0] ex2_code(int state);
    case (state)
      1: return 3'b000;
      2: return 3'b110;
      3: return 3'b101;
      4: return 3'b001;
      5: return 3'b010;
      6: return 3'b111;
      7: return 3'b011;
      default: return 3'b100;
    endcase
  endfunction

  // Level output z of each state.
  function automatic logic ex2_z(int state);
    return state == 4;
  endfunction

endpackage
