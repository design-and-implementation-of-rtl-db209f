// Self-checking testbench for checker_bit_generator.
//
// Uses the three received words of the worked example (no error, single
// error, double error), whose checker bits are C = 0 / 11 / 8 with overall
// parity check 0 / 1 / 0, then all 4096 12-bit words against the checker
// equations written out bit by bit:
//   C1 = R1^R3^R5^R7^R9^R11, C2 = R2^R3^R6^R7^R10^R11,
//   C3 = R4^R5^R6^R7, C4 = R8^R9^R10^R11, overall = XOR of R1..R12.
// A (7,4) instance is checked on all 128 words.
module tb_checker_bit_generator;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [12:1] r;
  logic [3:0]  syn;
  logic        ov;
  logic [7:1]  r4;
  logic [2:0]  syn4;
  logic        ov4;

  checker_bit_generator dut (.rx_code(r), .syndrome(syn), .overall(ov));
  checker_bit_generator #(.DATA_W(4), .SECDED(1'b0)) dut4 (.rx_code(r4), .syndrome(syn4), .overall(ov4));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] e;
    logic [2:0] e4;
    r4 = '0;
    // received words of the worked example, position 12 first
    r = 12'b0_01100101110; @(posedge clk);
    check(syn == 4'd0 && ov == 1'b0, $sformatf("no-error word: C=%0d P9=%b", syn, ov));
    r = 12'b1_11011001001; @(posedge clk);
    check(syn == 4'd11 && ov == 1'b1, $sformatf("single-error word: C=%0d P9=%b", syn, ov));
    r = 12'b0_01110110111; @(posedge clk);
    check(syn == 4'd8 && ov == 1'b0, $sformatf("double-error word: C=%0d P9=%b", syn, ov));

    for (int v = 0; v < 4096; v++) begin
      r = 12'(v);
      r4 = 7'(v);
      @(posedge clk);
      e[0] = r[1] ^ r[3] ^ r[5] ^ r[7] ^ r[9] ^ r[11];
      e[1] = r[2] ^ r[3] ^ r[6] ^ r[7] ^ r[10] ^ r[11];
      e[2] = r[4] ^ r[5] ^ r[6] ^ r[7];
      e[3] = r[8] ^ r[9] ^ r[10] ^ r[11];
      check(syn == e, $sformatf("word %b: C=%b expected %b", r, syn, e));
      check(ov == (r[1] ^ r[2] ^ r[3] ^ r[4] ^ r[5] ^ r[6] ^ r[7] ^ r[8] ^ r[9] ^ r[10] ^ r[11] ^ r[12]),
            $sformatf("word %b: overall parity", r));
      if (v < 128) begin
        e4[0] = r4[1] ^ r4[3] ^ r4[5] ^ r4[7];
        e4[1] = r4[2] ^ r4[3] ^ r4[6] ^ r4[7];
        e4[2] = r4[4] ^ r4[5] ^ r4[6] ^ r4[7];
        check(syn4 == e4 && ov4 == 1'b0, $sformatf("(7,4) word %b: C=%b expected %b", r4, syn4, e4));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
