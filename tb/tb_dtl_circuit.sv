// tb_dtl_circuit -- self-checking testbench of the general directional
// transition logic circuit.
//
// Two instances, each configured only through its truth-table parameters:
//  - cnt: the defaults, the modulo-four up/down counter. 200 random button
//    presses against an integer count modulo 4 (count = {Z1, Z2}).
//  - ex2: the eight-state machine of the second worked example (S=2, T=0,
//    R=3, M=1), driven on a 600-step random walk through its flow table
//    against tb_ref_pkg; the state code y1 y2 y3 and the output z are
//    checked.
//  - lvl: a one-input circuit with a level input (S=1, T=1, R=1, M=1):
//    Y1 = X11 l, Z_up = X11 l', Z_dn = X12 l. Random changes of x and l
//    against a direct model; exercises the level-input path.
// Every check is made one clock edge after the input change (latency) and
// after settling.
`timescale 1ns/1ps
module tb_dtl_circuit;
  import dtl_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0;
  logic preset;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- counter (defaults) ----
  logic [1:0] cx, cy, czu, czd, cz;
  dtl_circuit cnt (.clk, .preset, .x(cx), .l(1'b0), .y(cy), .z_up(czu), .z_dn(czd), .z(cz));

  // ---- example 2 ----
  localparam logic [1:0][2:0][7:0] E2_F_UP = {{8'hCC, 8'h11, 8'hFF}, {8'h3C, 8'hFF, 8'h00}};
  localparam logic [1:0][2:0][7:0] E2_F_DN = {{8'hFF, 8'hCC, 8'h00}, {8'h00, 8'h00, 8'hFF}};
  localparam logic [1:0][0:0][7:0] E2_G_UP = '0;
  localparam logic [1:0][0:0][7:0] E2_G_DN = {8'h11, 8'h3C};
  logic [1:0] ex;
  logic [2:0] ey;
  logic       ezu, ezd, ez;
  dtl_circuit #(.S(2), .T(0), .R(3), .M(1), .F_UP(E2_F_UP), .F_DN(E2_F_DN),
                .G_UP(E2_G_UP), .G_DN(E2_G_DN))
    ex2 (.clk, .preset, .x(ex), .l(1'b0), .y(ey), .z_up(ezu), .z_dn(ezd), .z(ez));

  // ---- level-input circuit ----
  // Index {l, y1}: f = l -> 4'b1100; g_up = l' -> 4'b0011; g_dn = l -> 4'b1100.
  logic lx, ll, ly, lzu, lzd, lz;
  dtl_circuit #(.S(1), .T(1), .R(1), .M(1), .F_UP(4'b1100), .F_DN(4'b0000),
                .G_UP(4'b0011), .G_DN(4'b1100))
    lvl (.clk, .preset, .x(lx), .l(ll), .y(ly), .z_up(lzu), .z_dn(lzd), .z(lz));

  int   count, state;
  logic r_ly, r_lzu, r_lzd;
  int   n_up = 0, n_dn = 0, n_ex2 = 0, n_lx = 0, n_ll = 0;

  task automatic check_all(input string what);
    checks++;
    if ({cz[0], cz[1]} !== 2'(count) || cz !== czu) begin
      failures++;
      $display("FAIL cnt %s: count=%0d z=%b", what, count, cz);
    end
    checks++;
    if ({ey[0], ey[1], ey[2]} !== ex2_code(state) || ez !== ex2_z(state)) begin
      failures++;
      $display("FAIL ex2 %s: state=%0d y=%b z=%b", what, state, ey, ez);
    end
    checks++;
    if (ly !== r_ly || lzu !== r_lzu || lzd !== r_lzd || lz !== (r_lzu ^ r_lzd)) begin
      failures++;
      $display("FAIL lvl %s: y=%b zu=%b zd=%b expected %b %b %b", what, ly, lzu, lzd,
               r_ly, r_lzu, r_lzd);
    end
  endtask

  task automatic settle();
    @(posedge clk); #1 check_all("latency");
    repeat (SETTLE_CYCLES) @(posedge clk);
    #1 check_all("settled");
  endtask

  initial begin
    int opts [2];
    int n_allowed;
    bit down;
    preset = 1'b1; cx = '0; ex = '0; lx = 1'b0; ll = 1'b0;
    count = 0; state = 1; r_ly = 1'b0; r_lzu = 1'b0; r_lzd = 1'b0;
    repeat (SETTLE_CYCLES + 1) @(posedge clk);
    #1 check_all("after preset");
    @(negedge clk) preset = 1'b0;

    for (int n = 0; n < 600; n++) begin
      // counter: press or release a button
      @(negedge clk);
      if (cx != 2'b00) cx = 2'b00;
      else if ($urandom_range(0, 1) == 1) begin cx = 2'b10; count = (count + 3) % 4; n_dn++; end
      else begin cx = 2'b01; count = (count + 1) % 4; n_up++; end
      // example 2: one allowed transition
      n_allowed = 0;
      if (ex2_next(state, 0, ex[0]) != 0) begin opts[n_allowed] = 0; n_allowed++; end
      if (ex2_next(state, 1, ex[1]) != 0) begin opts[n_allowed] = 1; n_allowed++; end
      if (n_allowed > 0) begin
        int inp;
        inp = opts[$urandom_range(0, n_allowed - 1)];
        down = ex[inp];
        ex[inp] = ~ex[inp];
        state = ex2_next(state, inp, down);
        n_ex2++;
      end
      // level circuit: change x or l (never both)
      if ($urandom_range(0, 1) == 1) begin
        lx = ~lx;
        n_lx++;
        if (lx) begin
          if (ll) r_ly = ~r_ly;
          else    r_lzu = ~r_lzu;
        end else if (ll) r_lzd = ~r_lzd;
      end else begin
        ll = ~ll;
        n_ll++;
      end
      settle();
    end
    if (n_up == 0 || n_dn == 0 || n_ex2 == 0 || n_lx == 0 || n_ll == 0) begin
      failures++;
      $display("FAIL an event kind never occurred");
    end
    $display("events: up=%0d down=%0d ex2 steps=%0d lvl x=%0d lvl l=%0d", n_up, n_dn, n_ex2, n_lx, n_ll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
