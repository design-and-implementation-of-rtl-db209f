// Self-checking testbench for error_injector: for every line value, err low
// must pass the bit and err high must invert it, over many cycles.
module tb_error_injector;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic li, err, lo;

  error_injector dut (.line_in(li), .err(err), .line_out(lo));

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
    for (int t = 0; t < 64; t++) begin
      li = t[0];
      err = t[1];
      @(posedge clk);
      check(lo == (err ? !li : li), $sformatf("line %b err %b gave %b", li, err, lo));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
