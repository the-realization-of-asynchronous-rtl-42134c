// tb_dtl_melem -- self-checking testbench of the M-element.
//
// Checks a two-input and a five-input element exhaustively: the output must
// be 1 exactly when an odd number of inputs is 1, and a change of any single
// input must change the output (every input transition passes through).
`timescale 1ns/1ps
module tb_dtl_melem;
  logic [1:0] a2;
  logic [4:0] a5;
  logic       z2, z5;
  int         checks = 0, failures = 0;

  dtl_melem #(.K(2)) dut2 (.x(a2), .z(z2));
  dtl_melem #(.K(5)) dut5 (.x(a5), .z(z5));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int ones;
      ones = 0;
      a2 = v[1:0];
      for (int b = 0; b < 2; b++) ones += v[b];
      #1 checks++;
      if (z2 !== ones[0]) begin failures++; $display("FAIL K=2 x=%b z=%b", a2, z2); end
    end
    for (int v = 0; v < 32; v++) begin
      int ones;
      logic zbefore;
      ones = 0;
      a5 = v[4:0];
      for (int b = 0; b < 5; b++) ones += v[b];
      #1 checks++;
      if (z5 !== ones[0]) begin failures++; $display("FAIL K=5 x=%b z=%b", a5, z5); end
      zbefore = z5;
      for (int b = 0; b < 5; b++) begin
        a5[b] = ~a5[b];
        #1 checks++;
        if (z5 === zbefore) begin failures++; $display("FAIL K=5 input %0d change lost", b); end
        a5[b] = ~a5[b];
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
