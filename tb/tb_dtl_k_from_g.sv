// tb_dtl_k_from_g -- self-checking testbench of the K-element built from G-elements.
//
// Applies a fixed opening sequence that walks the six cases of the
// element's input-output table (d=1 with x falling, rising, falling,
// rising; then d=0 with x falling and rising), then 400 random single input
// changes. The reference model keeps two toggle bits: with d=1 an upward x
// toggles w1 and a downward x toggles w2. Each change is checked one clock
// edge after it is applied (the element's latency) and again after the
// settling time. Counts how often each kind of event occurred and fails if
// one never did.
`timescale 1ns/1ps
module tb_dtl_k_from_g;
  import dtl_pkg::*;

  logic  clk = 1'b0;
  logic  preset, x, d;
  kout_t w;
  logic  ref_w1, ref_w2;
  int    checks = 0, failures = 0;
  int    n_up1 = 0, n_dn1 = 0, n_x0 = 0, n_d = 0;

  dtl_k_from_g dut (.clk, .preset, .x, .d, .w);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (w.w1 !== ref_w1 || w.w2 !== ref_w2) begin
      failures++;
      $display("FAIL %s: x=%0b d=%0b w=%0b%0b expected %0b%0b", what, x, d,
               w.w1, w.w2, ref_w1, ref_w2);
    end
  endtask

  // Apply one change: either toggle x or toggle d.
  task automatic step(input bit change_x);
    @(negedge clk);
    if (change_x) begin
      x = ~x;
      if (d) begin
        if (x) begin ref_w1 = ~ref_w1; n_up1++; end
        else   begin ref_w2 = ~ref_w2; n_dn1++; end
      end else n_x0++;
    end else begin
      d = ~d;
      n_d++;
    end
    @(posedge clk); #1;
    check("latency");
    repeat (SETTLE_CYCLES) @(posedge clk);
    #1 check("settled");
  endtask

  initial begin
    preset = 1'b1; x = 1'b0; d = 1'b0;
    ref_w1 = 1'b0; ref_w2 = 1'b0;
    repeat (SETTLE_CYCLES + 1) @(posedge clk);
    #1 check("after preset");
    @(negedge clk) preset = 1'b0;
    // Case walk: x up with d=0, then d up, then x down/up/down/up (cases
    // 1-4), then d down and x down/up (cases 5 and 6).
    step(1); step(0);
    step(1); step(1); step(1); step(1);
    step(0); step(1); step(1);
    for (int n = 0; n < 400; n++) step($urandom_range(0, 2) != 0);
    if (n_up1 == 0) begin failures++; $display("FAIL no upward x with d=1"); end
    if (n_dn1 == 0) begin failures++; $display("FAIL no downward x with d=1"); end
    if (n_x0  == 0) begin failures++; $display("FAIL no x change with d=0"); end
    if (n_d   == 0) begin failures++; $display("FAIL no d change"); end
    $display("events: up(d=1)=%0d down(d=1)=%0d x(d=0)=%0d d=%0d", n_up1, n_dn1, n_x0, n_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
