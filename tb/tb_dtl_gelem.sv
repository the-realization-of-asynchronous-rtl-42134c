// tb_dtl_gelem -- self-checking testbench of the G-element.
//
// 400 random single changes of x or d after a preset. Reference: each
// transition of x, in either direction, toggles z1 if d=1 and z2 if d=0; a
// change of d moves nothing. Checked one edge after each change (latency)
// and after the settling time.
`timescale 1ns/1ps
module tb_dtl_gelem;
  import dtl_pkg::*;

  logic clk = 1'b0;
  logic preset, x, d, z1, z2;
  logic r1, r2;
  int   checks = 0, failures = 0;
  int   n_x1 = 0, n_x0 = 0, n_d = 0;

  dtl_gelem dut (.clk, .preset, .x, .d, .z1, .z2);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (z1 !== r1 || z2 !== r2) begin
      failures++;
      $display("FAIL %s: x=%0b d=%0b z=%0b%0b expected %0b%0b", what, x, d, z1, z2, r1, r2);
    end
  endtask

  task automatic step(input bit change_x);
    @(negedge clk);
    if (change_x) begin
      x = ~x;
      if (d) begin r1 = ~r1; n_x1++; end
      else   begin r2 = ~r2; n_x0++; end
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
    preset = 1'b1; x = 1'b0; d = 1'b0; r1 = 1'b0; r2 = 1'b0;
    repeat (SETTLE_CYCLES + 1) @(posedge clk);
    #1 check("after preset");
    @(negedge clk) preset = 1'b0;
    for (int n = 0; n < 400; n++) step($urandom_range(0, 2) != 0);
    if (n_x1 == 0 || n_x0 == 0 || n_d == 0) begin
      failures++;
      $display("FAIL an event kind never occurred");
    end
    $display("events: x(d=1)=%0d x(d=0)=%0d d=%0d", n_x1, n_x0, n_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
