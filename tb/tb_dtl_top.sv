// tb_dtl_top -- end-to-end testbench of all circuits, at default parameters.
//
// After one preset, all five circuits are driven together for 800 steps; in
// each step every circuit receives one input change and every output is
// checked one clock edge later (the latency of all circuits) and again after
// the settling time:
//   cnt  random presses and releases, against a count modulo 4
//   ex2  random walk through the flow table (tb_ref_pkg)
//   gen  the same presses as cnt, against its own count
//   gk   random change of x or d; each x transition toggles z1 (d=1) or
//        z2 (d=0) and exactly one of the four directional outputs
//   kg   random change of x or d; K-element reference
//   kn   random change of x or d; K-element reference
// Mechanisms counted, each of which must occur: count up, count down, both
// wrap-arounds, every flow-table entry of ex2, the rise of ex2's output,
// all four directional products of gk, and for kg an upward and a downward
// transition with d=1, a transition ignored with d=0 and a change of d;
// the same four for kn.
`timescale 1ns/1ps
module tb_dtl_top;
  import dtl_pkg::*;
  import tb_ref_pkg::*;

  logic       clk = 1'b0;
  logic       preset;
  logic       cnt_x1, cnt_x2, cnt_z1, cnt_z2;
  logic       ex2_x1, ex2_x2, ex2_z;
  logic [2:0] ex2_y;
  logic [1:0] gen_x, gen_y, gen_z_up, gen_z_dn, gen_z;
  logic       gk_x, gk_d, gk_z1, gk_z2;
  logic [3:0] gk_wdir;
  logic       kg_x, kg_d;
  kout_t      kg_w;
  logic       kn_x, kn_d;
  kout_t      kn_w;

  dtl_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cnt_count, gen_count, state;
  logic       r_gk1, r_gk2, r_kg1, r_kg2;
  logic [3:0] r_gkw;
  int n_up = 0, n_dn = 0, n_wrap_up = 0, n_wrap_dn = 0, n_zrise = 0;
  int n_gkw [4];
  int n_kg_up = 0, n_kg_dn = 0, n_kg_ign = 0, n_kg_d = 0;
  int n_kn_up = 0, n_kn_dn = 0, n_kn_ign = 0, n_kn_d = 0;
  logic r_kn1, r_kn2;
  int taken [1:8][2][2];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  task automatic check_all();
    expect_eq("cnt", 8'({cnt_z1, cnt_z2}), 8'(cnt_count));
    expect_eq("gen", 8'({gen_z[0], gen_z[1]}), 8'(gen_count));
    expect_eq("ex2 y", 8'(ex2_y), 8'(ex2_code(state)));
    expect_eq("ex2 z", 8'(ex2_z), 8'(tb_ref_pkg::ex2_z(state)));
    expect_eq("gk", 8'({gk_z1, gk_z2, gk_wdir}), 8'({r_gk1, r_gk2, r_gkw}));
    expect_eq("kg", 8'({kg_w.w1, kg_w.w2}), 8'({r_kg1, r_kg2}));
    expect_eq("kn", 8'({kn_w.w1, kn_w.w2}), 8'({r_kn1, r_kn2}));
  endtask

  initial begin
    int opts [2];
    int n_allowed, inp, missing;
    bit down;
    foreach (taken[s, i, dd]) taken[s][i][dd] = 0;
    foreach (n_gkw[i]) n_gkw[i] = 0;
    preset = 1'b1;
    cnt_x1 = 0; cnt_x2 = 0; ex2_x1 = 0; ex2_x2 = 0; gen_x = '0;
    gk_x = 0; gk_d = 0; kg_x = 0; kg_d = 0; kn_x = 0; kn_d = 0;
    cnt_count = 0; gen_count = 0; state = 1;
    r_gk1 = 0; r_gk2 = 0; r_gkw = '0; r_kg1 = 0; r_kg2 = 0; r_kn1 = 0; r_kn2 = 0;
    repeat (SETTLE_CYCLES + 1) @(posedge clk);
    #1 check_all();
    @(negedge clk) preset = 1'b0;

    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      // counter and general circuit: press or release
      if (cnt_x1 || cnt_x2) begin
        cnt_x1 = 0; cnt_x2 = 0; gen_x = '0;
      end else if ($urandom_range(0, 1) == 1) begin
        cnt_x2 = 1; gen_x = 2'b10;
        if (cnt_count == 0) n_wrap_dn++;
        cnt_count = (cnt_count + 3) % 4; gen_count = (gen_count + 3) % 4; n_dn++;
      end else begin
        cnt_x1 = 1; gen_x = 2'b01;
        if (cnt_count == 3) n_wrap_up++;
        cnt_count = (cnt_count + 1) % 4; gen_count = (gen_count + 1) % 4; n_up++;
      end
      // example 2
      n_allowed = 0;
      if (ex2_next(state, 0, ex2_x1) != 0) begin opts[n_allowed] = 0; n_allowed++; end
      if (ex2_next(state, 1, ex2_x2) != 0) begin opts[n_allowed] = 1; n_allowed++; end
      if (n_allowed > 0) begin
        inp = opts[$urandom_range(0, n_allowed - 1)];
        if (inp == 0) begin down = ex2_x1; ex2_x1 = ~ex2_x1; end
        else          begin down = ex2_x2; ex2_x2 = ~ex2_x2; end
        taken[state][inp][down]++;
        state = ex2_next(state, inp, down);
        if (state == 4) n_zrise++;
      end
      // G-element from K-elements
      if ($urandom_range(0, 2) != 0) begin
        gk_x = ~gk_x;
        if (gk_d) r_gk1 = ~r_gk1; else r_gk2 = ~r_gk2;
        case ({gk_d, gk_x})
          2'b11: begin r_gkw[3] = ~r_gkw[3]; n_gkw[3]++; end
          2'b10: begin r_gkw[2] = ~r_gkw[2]; n_gkw[2]++; end
          2'b01: begin r_gkw[1] = ~r_gkw[1]; n_gkw[1]++; end
          default: begin r_gkw[0] = ~r_gkw[0]; n_gkw[0]++; end
        endcase
      end else gk_d = ~gk_d;
      // K-element from G-elements
      if ($urandom_range(0, 2) != 0) begin
        kg_x = ~kg_x;
        if (!kg_d) n_kg_ign++;
        else if (kg_x) begin r_kg1 = ~r_kg1; n_kg_up++; end
        else begin r_kg2 = ~r_kg2; n_kg_dn++; end
      end else begin
        kg_d = ~kg_d; n_kg_d++;
      end
      // K-element, NAND structure
      if ($urandom_range(0, 2) != 0) begin
        kn_x = ~kn_x;
        if (!kn_d) n_kn_ign++;
        else if (kn_x) begin r_kn1 = ~r_kn1; n_kn_up++; end
        else begin r_kn2 = ~r_kn2; n_kn_dn++; end
      end else begin
        kn_d = ~kn_d; n_kn_d++;
      end
      @(posedge clk); #1 check_all();
      repeat (SETTLE_CYCLES) @(posedge clk);
      #1 check_all();
    end

    missing = 0;
    for (int s = 1; s <= 8; s++)
      for (int i = 0; i < 2; i++)
        for (int dd = 0; dd < 2; dd++)
          if (ex2_next(s, i, dd[0]) != 0 && taken[s][i][dd] == 0) missing++;
    if (n_up == 0 || n_dn == 0 || n_wrap_up == 0 || n_wrap_dn == 0 || n_zrise == 0 ||
        missing != 0 || n_gkw[0] == 0 || n_gkw[1] == 0 || n_gkw[2] == 0 || n_gkw[3] == 0 ||
        n_kg_up == 0 || n_kg_dn == 0 || n_kg_ign == 0 || n_kg_d == 0 ||
        n_kn_up == 0 || n_kn_dn == 0 || n_kn_ign == 0 || n_kn_d == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("events: up=%0d down=%0d wrap3->0=%0d wrap0->3=%0d ex2 z rises=%0d ex2 entries missing=%0d",
             n_up, n_dn, n_wrap_up, n_wrap_dn, n_zrise, missing);
    $display("events: gk dir=%0d/%0d/%0d/%0d kg up=%0d down=%0d ignored=%0d d=%0d",
             n_gkw[3], n_gkw[2], n_gkw[1], n_gkw[0], n_kg_up, n_kg_dn, n_kg_ign, n_kg_d);
    $display("events: kn up=%0d down=%0d ignored=%0d d=%0d", n_kn_up, n_kn_dn, n_kn_ign, n_kn_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
