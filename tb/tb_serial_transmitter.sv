// Self-checking testbench for serial_transmitter (12-bit frames).
//
// Inputs are driven on the falling edge and the line is sampled just before
// the next rising edge. With ten low the line must be 0. With ten high the
// n-th enabled cycle must carry h[n], wrapping to position 1 after 12, and
// dropping ten in mid-frame must restart the next frame at position 1.
module tb_serial_transmitter;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        ten;
  logic [12:1] h;
  logic        mh;

  serial_transmitter dut (.clk(clk), .ten(ten), .h(h), .mh(mh));

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
    ten = 1'b0;
    h = '0;
    repeat (2) @(negedge clk);
    for (int t = 0; t < 20; t++) begin
      h = 12'($urandom);
      ten = 1'b0;
      @(negedge clk);
      check(mh == 1'b0, "idle line not 0");
      ten = 1'b1;
      // two whole frames
      for (int n = 0; n < 24; n++) begin
        #4;
        check(mh == h[(n % 12) + 1], $sformatf("frame bit %0d: got %b expected %b", n % 12 + 1, mh, h[(n % 12) + 1]));
        @(negedge clk);
      end
      // a partial frame, then restart
      for (int n = 0; n < 5; n++) @(negedge clk);
      ten = 1'b0;
      @(negedge clk);
      ten = 1'b1;
      #4;
      check(mh == h[1], "restart does not begin at position 1");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
