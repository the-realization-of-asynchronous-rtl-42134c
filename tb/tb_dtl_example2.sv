// tb_dtl_example2 -- self-checking testbench of the eight-state machine.
//
// A random walk of 600 steps through the machine's flow table: in each
// stable state one of the input transitions the table allows is applied.
// The reference (tb_ref_pkg) gives the next state, its code y1 y2 y3 and
// the output z; both are checked one clock edge after the input change and
// after settling. Every one of the eleven table entries must be taken at
// least once.
`timescale 1ns/1ps
module tb_dtl_example2;
  import dtl_pkg::*;
  import tb_ref_pkg::*;

  logic       clk = 1'b0;
  logic       preset, x1, x2, z;
  logic [2:0] y;
  int         state;
  int         checks = 0, failures = 0;
  int         taken [1:8][2][2];

  dtl_example2 dut (.clk, .preset, .x1, .x2, .z, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (y !== ex2_code(state) || z !== ex2_z(state)) begin
      failures++;
      $display("FAIL %s: state %0d y=%b z=%b expected y=%b z=%b", what, state, y, z,
               ex2_code(state), ex2_z(state));
    end
  endtask

  task automatic move(input int inp);
    bit down;
    @(negedge clk);
    if (inp == 0) begin down = x1; x1 = ~x1; end
    else          begin down = x2; x2 = ~x2; end
    taken[state][inp][down]++;
    state = ex2_next(state, inp, down);
    @(posedge clk); #1 check("latency");
    repeat (SETTLE_CYCLES) @(posedge clk);
    #1 check("settled");
  endtask

  initial begin
    int n_allowed, pick, missing;
    int opts [2];
    foreach (taken[s, i, dd]) taken[s][i][dd] = 0;
    preset = 1'b1; x1 = 1'b0; x2 = 1'b0; state = 1;
    repeat (SETTLE_CYCLES + 1) @(posedge clk);
    #1 check("after preset");
    @(negedge clk) preset = 1'b0;
    for (int n = 0; n < 600; n++) begin
      n_allowed = 0;
      if (ex2_next(state, 0, x1) != 0) begin opts[n_allowed] = 0; n_allowed++; end
      if (ex2_next(state, 1, x2) != 0) begin opts[n_allowed] = 1; n_allowed++; end
      if (n_allowed == 0) begin
        failures++;
        $display("FAIL reference walk stuck in state %0d", state);
        break;
      end
      pick = opts[$urandom_range(0, n_allowed - 1)];
      move(pick);
    end
    missing = 0;
    for (int s = 1; s <= 8; s++)
      for (int i = 0; i < 2; i++)
        for (int dd = 0; dd < 2; dd++)
          if (ex2_next(s, i, dd[0]) != 0 && taken[s][i][dd] == 0) missing++;
    if (missing != 0) begin
      failures++;
      $display("FAIL %0d flow-table entries never taken", missing);
    end
    $display("events: flow-table entries not taken=%0d", missing);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
