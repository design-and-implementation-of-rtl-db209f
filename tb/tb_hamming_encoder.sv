// Self-checking testbench for hamming_encoder.
//
// Checks the 7-bit SEC-DED encoder against the worked example (data
// D7..D1 = 0110101 gives the 12-bit word 0 0110 0101 110, P9 first) and then
// exhaustively against the parity equations written out bit by bit:
//   P1 = D1^D2^D4^D5^D7, P2 = D1^D3^D4^D6^D7, P4 = D2^D3^D4, P8 = D5^D6^D7,
//   P9 = XOR of the eleven Hamming bits.
// A second instance checks the 4-bit (7,4) encoder exhaustively against
//   P1 = D1^D2^D4, P2 = D1^D3^D4, P4 = D2^D3^D4.
module tb_hamming_encoder;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [7:1]  d7;
  logic [12:1] c7;
  logic [4:1]  d4;
  logic [7:1]  c4;

  hamming_encoder dut7 (.data(d7), .code(c7));
  hamming_encoder #(.DATA_W(4), .SECDED(1'b0)) dut4 (.data(d4), .code(c4));

  function automatic logic [12:1] ref7(input logic [7:1] d);
    logic [12:1] c;
    c[3] = d[1]; c[5] = d[2]; c[6] = d[3]; c[7] = d[4];
    c[9] = d[5]; c[10] = d[6]; c[11] = d[7];
    c[1] = d[1] ^ d[2] ^ d[4] ^ d[5] ^ d[7];
    c[2] = d[1] ^ d[3] ^ d[4] ^ d[6] ^ d[7];
    c[4] = d[2] ^ d[3] ^ d[4];
    c[8] = d[5] ^ d[6] ^ d[7];
    c[12] = c[1] ^ c[2] ^ c[3] ^ c[4] ^ c[5] ^ c[6] ^ c[7] ^ c[8] ^ c[9] ^ c[10] ^ c[11];
    return c;
  endfunction

  function automatic logic [7:1] ref4(input logic [4:1] d);
    logic [7:1] c;
    c[3] = d[1]; c[5] = d[2]; c[6] = d[3]; c[7] = d[4];
    c[1] = d[1] ^ d[2] ^ d[4];
    c[2] = d[1] ^ d[3] ^ d[4];
    c[4] = d[2] ^ d[3] ^ d[4];
    return c;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example: D7..D1 = 0 1 1 0 1 0 1
    d7 = 7'b0110101;
    d4 = 4'b0101;
    @(posedge clk);
    check(c7 == 12'b0_01100101110, $sformatf("example word %b", c7));
    // (7,4) example: D4..D1 = 0101 -> D4 D3 D2 P4 D1 P2 P1
    check(c4 == {1'b0, 1'b1, 1'b0, 1'b1 ^ 1'b0 ^ 1'b0, 1'b1, 1'b1 ^ 1'b1 ^ 1'b0, 1'b1 ^ 1'b0 ^ 1'b0},
          $sformatf("(7,4) example word %b", c4));

    for (int v = 0; v < 128; v++) begin
      d7 = 7'(v);
      d4 = 4'(v);
      @(posedge clk);
      check(c7 == ref7(d7), $sformatf("data %b: got %b expected %b", d7, c7, ref7(d7)));
      check(^c7 == 1'b0, $sformatf("data %b: word parity not even", d7));
      if (v < 16)
        check(c4 == ref4(d4), $sformatf("(7,4) data %b: got %b expected %b", d4, c4, ref4(d4)));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
