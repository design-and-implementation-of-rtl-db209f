// Self-checking testbench for syndrome_decoder: every select value of the
// 4-to-16 and the 3-to-8 decoder must give exactly the one output 2^sel.
module tb_syndrome_decoder;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [3:0]  s;
  logic [15:0] y;
  logic [2:0]  s3;
  logic [7:0]  y3;

  syndrome_decoder dut (.sel(s), .y(y));
  syndrome_decoder #(.SEL_W(3)) dut3 (.sel(s3), .y(y3));

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
    for (int v = 0; v < 16; v++) begin
      s = 4'(v);
      s3 = 3'(v);
      @(posedge clk);
      check(y == (16'd1 << v), $sformatf("sel %0d: y=%b", v, y));
      if (v < 8) check(y3 == (8'd1 << v), $sformatf("3-to-8 sel %0d: y=%b", v, y3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
