// Self-checking testbench for error_corrector: for random received words and
// every one-hot select Y0..Y15, with the enable high only the selected
// position 1..11 is inverted (Y0 and Y12..Y15 change nothing); with the
// enable low the word passes unchanged.
module tb_error_corrector;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [11:1] rx, cor;
  logic [15:0] sel;
  logic        en;

  error_corrector dut (.rx_code(rx), .sel(sel), .enable(en), .corrected(cor));

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
    logic [11:1] expct;
    for (int t = 0; t < 50; t++) begin
      rx = 11'($urandom);
      for (int n = 0; n < 16; n++) begin
        sel = 16'd1 << n;
        en = 1'b1;
        @(posedge clk);
        expct = rx;
        if (n >= 1 && n <= 11) expct[n] = ~rx[n];
        check(cor == expct, $sformatf("rx %b sel Y%0d: got %b expected %b", rx, n, cor, expct));
        en = 1'b0;
        @(posedge clk);
        check(cor == rx, $sformatf("rx %b sel Y%0d disabled: got %b", rx, n, cor));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
