// tb_dtl_mod4_counter -- self-checking testbench of the modulo-four counter.
//
// 300 random button presses (x1 counts up, x2 counts down; one button at a
// time, each press followed by its release). The reference is an integer
// count modulo 4. The count {z1,z2} is checked one clock edge after the
// button goes down (the counter's latency), after settling, and after the
// release (which must not change it). Counts up and down presses and the
// wrap-arounds 3->0 and 0->3, and fails if one of them never happened.
`timescale 1ns/1ps
module tb_dtl_mod4_counter;
  import dtl_pkg::*;

  logic clk = 1'b0;
  logic preset, x1, x2, z1, z2;
  int   count;
  int   checks = 0, failures = 0;
  int   n_up = 0, n_dn = 0, n_wrap_up = 0, n_wrap_dn = 0;

  dtl_mod4_counter dut (.clk, .preset, .x1, .x2, .z1, .z2);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if ({z1, z2} !== 2'(count)) begin
      failures++;
      $display("FAIL %s: count=%0d z1z2=%0b%0b", what, count, z1, z2);
    end
  endtask

  task automatic press(input bit down_button);
    @(negedge clk);
    if (down_button) begin
      x2 = 1'b1;
      if (count == 0) n_wrap_dn++;
      count = (count + 3) % 4;
      n_dn++;
    end else begin
      x1 = 1'b1;
      if (count == 3) n_wrap_up++;
      count = (count + 1) % 4;
      n_up++;
    end
    @(posedge clk); #1 check("press latency");
    repeat (SETTLE_CYCLES) @(posedge clk);
    #1 check("press settled");
    @(negedge clk);
    x1 = 1'b0;
    x2 = 1'b0;
    repeat (SETTLE_CYCLES + 1) @(posedge clk);
    #1 check("release");
  endtask

  initial begin
    preset = 1'b1; x1 = 1'b0; x2 = 1'b0; count = 0;
    repeat (SETTLE_CYCLES + 1) @(posedge clk);
    #1 check("after preset");
    @(negedge clk) preset = 1'b0;
    // A full turn up, a full turn down, then random presses.
    repeat (4) press(1'b0);
    repeat (4) press(1'b1);
    for (int n = 0; n < 300; n++) press($urandom_range(0, 1) == 1);
    if (n_up == 0 || n_dn == 0 || n_wrap_up == 0 || n_wrap_dn == 0) begin
      failures++;
      $display("FAIL an event kind never occurred");
    end
    $display("events: up=%0d down=%0d wrap 3->0=%0d wrap 0->3=%0d", n_up, n_dn, n_wrap_up, n_wrap_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
