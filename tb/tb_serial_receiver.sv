// Self-checking testbench for serial_receiver (12-bit frames).
//
// A 12-bit pattern is driven onto the line one bit per cycle, position 1
// first, with ren high for exactly 12 cycles. frame_done must rise in the
// cycle after the 12th rising edge, not earlier, and dmh must then equal the
// pattern. With ren low, dmh must hold its contents.
module tb_serial_receiver;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        ren;
  logic        line;
  logic [12:1] dmh;
  logic        done;

  serial_receiver dut (.clk(clk), .ren(ren), .line(line), .dmh(dmh), .frame_done(done));

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
    logic [12:1] pat;
    int done_at;
    ren = 1'b0;
    line = 1'b0;
    repeat (2) @(negedge clk);
    for (int t = 0; t < 30; t++) begin
      pat = 12'($urandom);
      done_at = -1;
      for (int n = 1; n <= 12; n++) begin
        ren = 1'b1;
        line = pat[n];
        @(negedge clk);
        if (done && done_at < 0) done_at = n;
      end
      ren = 1'b0;
      line = ~line;
      check(done == 1'b1 && done_at == 12, $sformatf("frame_done after %0d edges, expected 12", done_at));
      check(dmh == pat, $sformatf("received %b expected %b", dmh, pat));
      // idle: contents held, no further frame_done
      repeat (3) begin
        line = 1'($urandom);
        @(negedge clk);
        check(dmh == pat && !done, "contents not held while ren is low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
