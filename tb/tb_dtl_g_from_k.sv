// tb_dtl_g_from_k -- self-checking testbench of the G-element built from two
// K-elements.
//
// 400 random single changes of x or d after a preset. Reference: each
// transition of x toggles z1 if d=1 and z2 if d=0, and of the four
// directional outputs {X11 d, X12 d, X11 d', X12 d'} exactly the one that
// matches the direction of x and the level of d toggles. Checked one edge
// after each change (latency) and after the settling time.
`timescale 1ns/1ps
module tb_dtl_g_from_k;
  import dtl_pkg::*;

  logic       clk = 1'b0;
  logic       preset, x, d, z1, z2;
  logic [3:0] wdir;
  logic       r1, r2;
  logic [3:0] rw;
  int         checks = 0, failures = 0;
  int         n_up1 = 0, n_dn1 = 0, n_up0 = 0, n_dn0 = 0, n_d = 0;

  dtl_g_from_k dut (.clk, .preset, .x, .d, .z1, .z2, .wdir);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (z1 !== r1 || z2 !== r2 || wdir !== rw) begin
      failures++;
      $display("FAIL %s: x=%0b d=%0b z=%0b%0b w=%b expected %0b%0b %b", what, x, d,
               z1, z2, wdir, r1, r2, rw);
    end
  endtask

  task automatic step(input bit change_x);
    @(negedge clk);
    if (change_x) begin
      x = ~x;
      if (d) begin
        r1 = ~r1;
        if (x) begin rw[3] = ~rw[3]; n_up1++; end
        else   begin rw[2] = ~rw[2]; n_dn1++; end
      end else begin
        r2 = ~r2;
        if (x) begin rw[1] = ~rw[1]; n_up0++; end
        else   begin rw[0] = ~rw[0]; n_dn0++; end
      end
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
    preset = 1'b1; x = 1'b0; d = 1'b0; r1 = 1'b0; r2 = 1'b0; rw = '0;
    repeat (SETTLE_CYCLES + 1) @(posedge clk);
    #1 check("after preset");
    @(negedge clk) preset = 1'b0;
    for (int n = 0; n < 400; n++) step($urandom_range(0, 2) != 0);
    if (n_up1 == 0 || n_dn1 == 0 || n_up0 == 0 || n_dn0 == 0 || n_d == 0) begin
      failures++;
      $display("FAIL an event kind never occurred");
    end
    $display("events: up(d=1)=%0d down(d=1)=%0d up(d=0)=%0d down(d=0)=%0d d=%0d",
             n_up1, n_dn1, n_up0, n_dn0, n_d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
