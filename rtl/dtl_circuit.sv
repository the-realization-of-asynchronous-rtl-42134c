// dtl_circuit -- general directional transition logic circuit.
//
// Function: a Mealy machine with S transition inputs x, T level inputs l,
// R state variables y and M outputs, written in transition form:
//   Y_j  = sum_i X_i1 f_up[i][j](l,y) + X_i2 f_dn[i][j](l,y)
//   Z_k1 = sum_i X_i1 g_up[i][k](l,y)
//   Z_k2 = sum_i X_i2 g_dn[i][k](l,y)
// where X_i1/X_i2 are the upward/downward transitions of x[i], a product with
// a level function means "this transition, taken while the function is 1",
// and the sum of transitions is their modulo-2 merge. A transition variable
// equal to 1 toggles the level of the state variable or output it names.
//
// Insides: the three-block structure of the general configuration. A level
// combinational block evaluates every f and g from (l, y); the functions are
// given as truth tables in the parameters F_UP, F_DN, G_UP, G_DN, indexed by
// {l, y} with y[0] = y_1 in the least significant bit. A bank of K-elements,
// one per product term, multiplies each transition of x[i] with its level
// function: the term X_i1 f uses the upward output w1 of a K-element whose d
// is f, the term X_i2 f the downward output w2. M-elements merge the terms:
// one per state variable (its output is the level y_j fed back to the
// combinational block), one per upward output z_up[k] (Z_k1) and one per
// downward output z_dn[k] (Z_k2). z[k] = z_up[k] ^ z_dn[k] is the output
// that answers both directions (Z_k = Z_k1 + Z_k2). No K-element is shared
// between terms with equal level functions, so the bank is larger than a
// hand-optimised circuit such as dtl_mod4_counter; terms whose table is all
// zero leave a K-element that never moves.
//
// The defaults are the modulo-four up/down counter (S=2 buttons, T=0,
// R=2, M=2): Y1 = X21 + X22, Y2 = X12 + X21, Z1 = X11 y2 + X21 y2',
// Z2 = X11 + X21, with z = {Z2, Z1} (z[0] = Z1).
//
// Interface: clk (sampling clock of the K-elements' delay elements), preset
// (active high; hold for dtl_pkg::SETTLE_CYCLES edges with x=0), x[S-1:0],
// l[LW-1:0] (LW = max(T,1); unused when T=0); outputs y, z_up, z_dn, z.
// Timing: y and the outputs change on the first clk edge after a transition
// of x. Only one bit of x may change at a time, l may change only while x is
// steady, and every change must be held for dtl_pkg::SETTLE_CYCLES edges.
module dtl_circuit
  import dtl_pkg::*;
#(
  parameter int unsigned S  = 2,
  parameter int unsigned T  = 0,
  parameter int unsigned R  = 2,
  parameter int unsigned M  = 2,
  parameter int unsigned LW = (T > 0) ? T : 1,
  parameter int unsigned NI = 2 ** (T + R),
  parameter logic [S-1:0][R-1:0][NI-1:0] F_UP = {{4'hF, 4'hF}, {4'h0, 4'h0}},
  parameter logic [S-1:0][R-1:0][NI-1:0] F_DN = {{4'h0, 4'hF}, {4'hF, 4'h0}},
  parameter logic [S-1:0][M-1:0][NI-1:0] G_UP = {{4'hF, 4'h3}, {4'hF, 4'hC}},
  parameter logic [S-1:0][M-1:0][NI-1:0] G_DN = '0
) (
  input  logic          clk,
  input  logic          preset,
  input  logic [S-1:0]  x,
  input  logic [LW-1:0] l,
  output logic [R-1:0]  y,
  output logic [M-1:0]  z_up,
  output logic [M-1:0]  z_dn,
  output logic [M-1:0]  z
);

  // Index of the truth tables: {l, y}.
  logic [T+R-1:0] idx;
  generate
    if (T > 0) begin : g_idx_l
      assign idx = {l[T-1:0], y};
    end else begin : g_idx_y
      assign idx = y;
      logic unused_l;
      assign unused_l = ^l;
    end
  endgenerate

  // Level combinational block.
  logic [S-1:0][R-1:0] f_up, f_dn;
  logic [S-1:0][M-1:0] g_up, g_dn;
  always_comb begin
    for (int i = 0; i < S; i++) begin
      for (int j = 0; j < R; j++) begin
        f_up[i][j] = F_UP[i][j][idx];
        f_dn[i][j] = F_DN[i][j][idx];
      end
      for (int k = 0; k < M; k++) begin
        g_up[i][k] = G_UP[i][k][idx];
        g_dn[i][k] = G_DN[i][k][idx];
      end
    end
  end

  // K-element bank: one element per product term. Only the output of the
  // matching direction is used.
  kout_t [S-1:0][R-1:0] kf_up, kf_dn;
  kout_t [S-1:0][M-1:0] kg_up, kg_dn;
  logic  [R-1:0][2*S-1:0] y_terms;
  logic  [M-1:0][S-1:0]   zu_terms, zd_terms;

  genvar gi, gj;
  generate
    for (gi = 0; gi < S; gi++) begin : g_in
      for (gj = 0; gj < R; gj++) begin : g_state
        dtl_kelem u_kf_up (.clk, .preset, .x(x[gi]), .d(f_up[gi][gj]), .w(kf_up[gi][gj]));
        dtl_kelem u_kf_dn (.clk, .preset, .x(x[gi]), .d(f_dn[gi][gj]), .w(kf_dn[gi][gj]));
        assign y_terms[gj][2*gi]   = kf_up[gi][gj].w1;
        assign y_terms[gj][2*gi+1] = kf_dn[gi][gj].w2;
      end
      for (gj = 0; gj < M; gj++) begin : g_out
        dtl_kelem u_kg_up (.clk, .preset, .x(x[gi]), .d(g_up[gi][gj]), .w(kg_up[gi][gj]));
        dtl_kelem u_kg_dn (.clk, .preset, .x(x[gi]), .d(g_dn[gi][gj]), .w(kg_dn[gi][gj]));
        assign zu_terms[gj][gi] = kg_up[gi][gj].w1;
        assign zd_terms[gj][gi] = kg_dn[gi][gj].w2;
      end
    end

    // M-element banks.
    for (gj = 0; gj < R; gj++) begin : g_my
      dtl_melem #(.K(2*S)) u_m (.x(y_terms[gj]), .z(y[gj]));
    end
    for (gj = 0; gj < M; gj++) begin : g_mz
      dtl_melem #(.K(S)) u_mu (.x(zu_terms[gj]), .z(z_up[gj]));
      dtl_melem #(.K(S)) u_md (.x(zd_terms[gj]), .z(z_dn[gj]));
    end
  endgenerate

  assign z = z_up ^ z_dn;

  // The unused output of every K-element in the bank.
  logic unused_w;
  always_comb begin
    unused_w = 1'b0;
    for (int i = 0; i < S; i++) begin
      for (int j = 0; j < R; j++) unused_w ^= kf_up[i][j].w2 ^ kf_dn[i][j].w1;
      for (int k = 0; k < M; k++) unused_w ^= kg_up[i][k].w2 ^ kg_dn[i][k].w1;
    end
  end

endmodule
