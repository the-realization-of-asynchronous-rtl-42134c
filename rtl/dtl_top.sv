// dtl_top -- the directional transition logic circuits side by side.
//
// The library holds independent asynchronous circuits that share nothing but
// the sampling clock of their delay elements and the preset line. Each one
// has its own ports here:
//   cnt_*  modulo-four up/down counter (4 K-elements, 3 M-elements)
//   ex2_*  eight-state machine of the second worked example (5 K, 4 M)
//   gen_*  general circuit (K-element bank, level logic, M-element banks),
//          configured by its default truth tables as the modulo-four counter
//   gk_*   G-element assembled from two K-elements
//   kg_*   K-element assembled from two G-elements
//   kn_*   K-element in its NAND / wired-or gate structure
// The K-element, M-element and G-element are used inside these.
//
// Interface: clk, preset (active high; hold for dtl_pkg::SETTLE_CYCLES
// edges with every input at 0), then the ports of each circuit as listed.
// Timing: every output answers on the first clk edge after the input
// transition that causes it; inputs must be held for dtl_pkg::SETTLE_CYCLES
// edges between changes, one input of a circuit at a time.
module dtl_top
  import dtl_pkg::*;
(
  input  logic       clk,
  input  logic       preset,
  // modulo-four counter
  input  logic       cnt_x1,
  input  logic       cnt_x2,
  output logic       cnt_z1,
  output logic       cnt_z2,
  // example 2
  input  logic       ex2_x1,
  input  logic       ex2_x2,
  output logic       ex2_z,
  output logic [2:0] ex2_y,
  // general circuit
  input  logic [1:0] gen_x,
  output logic [1:0] gen_y,
  output logic [1:0] gen_z_up,
  output logic [1:0] gen_z_dn,
  output logic [1:0] gen_z,
  // G-element from K-elements
  input  logic       gk_x,
  input  logic       gk_d,
  output logic       gk_z1,
  output logic       gk_z2,
  output logic [3:0] gk_wdir,
  // K-element from G-elements
  input  logic       kg_x,
  input  logic       kg_d,
  output kout_t      kg_w,
  // K-element, NAND / wired-or structure
  input  logic       kn_x,
  input  logic       kn_d,
  output kout_t      kn_w
);

  dtl_mod4_counter u_cnt (.clk, .preset, .x1(cnt_x1), .x2(cnt_x2), .z1(cnt_z1), .z2(cnt_z2));

  dtl_example2 u_ex2 (.clk, .preset, .x1(ex2_x1), .x2(ex2_x2), .z(ex2_z), .y(ex2_y));

  dtl_circuit u_gen (.clk, .preset, .x(gen_x), .l(1'b0), .y(gen_y), .z_up(gen_z_up),
                     .z_dn(gen_z_dn), .z(gen_z));

  dtl_g_from_k u_gk (.clk, .preset, .x(gk_x), .d(gk_d), .z1(gk_z1), .z2(gk_z2), .wdir(gk_wdir));

  dtl_k_from_g u_kg (.clk, .preset, .x(kg_x), .d(kg_d), .w(kg_w));

  dtl_kelem_nand u_kn (.clk, .preset, .x(kn_x), .d(kn_d), .w(kn_w));

endmodule
