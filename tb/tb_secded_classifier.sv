// Self-checking testbench for secded_classifier: all four combinations of
// (C != 0, overall parity check) against the decision flowchart, for the
// SEC-DED and the plain Hamming configuration.
module tb_secded_classifier;
  import hamming_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic    nz, ov;
  status_e st, st0;
  logic    vld, ce, vld0, ce0;

  secded_classifier dut (.syndrome_nz(nz), .overall(ov), .status(st), .valid(vld), .correct_en(ce));
  secded_classifier #(.SECDED(1'b0)) dut0 (.syndrome_nz(nz), .overall(ov), .status(st0), .valid(vld0), .correct_en(ce0));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // C=0, P9=0: no error, valid
    nz = 0; ov = 0; @(posedge clk);
    check(st == ST_NO_ERROR && vld && !ce, "C=0 P9=0");
    check(st0 == ST_NO_ERROR && vld0 && !ce0, "plain C=0");
    // C!=0, P9=1: single error, corrected, valid
    nz = 1; ov = 1; @(posedge clk);
    check(st == ST_SINGLE && vld && ce, "C!=0 P9=1");
    check(st0 == ST_SINGLE && vld0 && ce0, "plain C!=0 (a)");
    // C!=0, P9=0: double error, invalid
    nz = 1; ov = 0; @(posedge clk);
    check(st == ST_DOUBLE && !vld && !ce, "C!=0 P9=0");
    check(st0 == ST_SINGLE && vld0 && ce0, "plain C!=0 (b)");
    // C=0, P9=1: none of the three conditions, invalid
    nz = 0; ov = 1; @(posedge clk);
    check(st == ST_UNCLASSIFIED && !vld && !ce, "C=0 P9=1");
    check(st0 == ST_NO_ERROR && vld0 && !ce0, "plain C=0 (b)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
