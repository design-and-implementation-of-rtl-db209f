// Self-checking testbench for seven_seg_display: each hex digit must light
// exactly the segments listed by letter (a-g) for its usual glyph.
module tb_seven_seg_display;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [3:0] v;
  logic [6:0] seg;

  seven_seg_display dut (.value(v), .seg(seg));

  // lit segments of 0..F
  string glyph [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                        "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] segs_of(input string s);
    logic [6:0] r = '0;
    for (int i = 0; i < s.len(); i++) r[3'(s[i] - "a")] = 1'b1;
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
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      v = 4'(d);
      @(posedge clk);
      check(seg == segs_of(glyph[d]), $sformatf("digit %h: seg %b expected %b", d, seg, segs_of(glyph[d])));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
