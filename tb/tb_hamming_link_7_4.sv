// End-to-end testbench for hamming_link in its 4-bit configuration: a (7,4)
// Hamming code without the overall parity bit, sent serially in 7-bit frames.
//
// Every 4-bit message is sent once without error and once with each of the 7
// single-bit errors. Each received frame must arrive after exactly 7 cycles
// and be corrected to the sent word and message, with the display showing
// the position of the error (0 for none). The reference encoder is written
// from P1 = D1^D2^D4, P2 = D1^D3^D4, P4 = D2^D3^D4.
module tb_hamming_link_7_4;
  import hamming_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [3:0] d;
  logic       ten, err, ren;
  logic [7:1] dh;
  logic [6:0] error;
  logic [3:0] data_out;
  status_e    status;
  logic       valid;
  logic       frame_done;

  hamming_link #(.DATA_W(4), .SECDED(1'b0)) dut (
    .clk(clk), .d(d), .ten(ten), .err(err), .ren(ren),
    .dh(dh), .error(error), .data_out(data_out), .status(status), .valid(valid),
    .frame_done(frame_done)
  );

  int n_clean = 0, n_single = 0;

  function automatic logic [7:1] ref4(input logic [4:1] m);
    logic [7:1] c;
    c[3] = m[1]; c[5] = m[2]; c[6] = m[3]; c[7] = m[4];
    c[1] = m[1] ^ m[2] ^ m[4];
    c[2] = m[1] ^ m[3] ^ m[4];
    c[4] = m[2] ^ m[3] ^ m[4];
    return c;
  endfunction

  string glyph [8] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc"};

  function automatic logic [6:0] segs_of(input logic [2:0] digit);
    logic [6:0] r = '0;
    for (int i = 0; i < glyph[digit].len(); i++) r[3'(glyph[digit][i] - "a")] = 1'b1;
    return r;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    d = '0;
    ten = 1'b0;
    ren = 1'b0;
    err = 1'b0;
    repeat (3) @(negedge clk);
    for (int v = 0; v < 16; v++) begin
      for (int i = 0; i <= 7; i++) begin
        d = 4'(v);
        ten = 1'b1;
        ren = 1'b1;
        cycles = 0;
        for (int n = 1; n <= 7; n++) begin
          err = (n == i);
          @(negedge clk);
          cycles++;
          if (frame_done) break;
        end
        err = 1'b0;
        ten = 1'b0;
        ren = 1'b0;
        check(frame_done && cycles == 7, $sformatf("frame_done after %0d cycles, expected 7", cycles));
        check(dh == ref4(4'(v)) && data_out == 4'(v) && valid && error == segs_of(3'(i)) &&
              status == (i == 0 ? ST_NO_ERROR : ST_SINGLE),
              $sformatf("msg %0d error at %0d: dh %b data %b status %s", v, i, dh, data_out, status.name()));
        if (i == 0) n_clean++; else n_single++;
        @(negedge clk);
      end
    end
    check(n_clean > 0 && n_single > 0, "mechanism not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
