// Self-checking testbench for hamming_decoder.
//
// First the three received words of the worked example: the error-free
// word decodes to D7..D1 = 0110101; the single-error word has C = 11 and is
// corrected to D7..D1 = 0101000; the double-error word has C = 8 and is
// reported invalid. Then, for every 7-bit data word encoded with a reference
// encoder written from the parity equations: no error, each of the 12
// single-bit errors and each of the 66 double-bit errors. A (7,4) instance
// without the overall parity bit is checked on every single-bit error.
module tb_hamming_decoder;
  import hamming_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [12:1] rx, cor;
  logic [7:1]  data;
  logic [3:0]  syn;
  status_e     st;
  logic        vld;

  logic [7:1]  rx4, cor4;
  logic [4:1]  data4;
  logic [2:0]  syn4;
  status_e     st4;
  logic        vld4;

  hamming_decoder dut (.rx_code(rx), .corrected(cor), .data(data), .syndrome(syn), .status(st), .valid(vld));
  hamming_decoder #(.DATA_W(4), .SECDED(1'b0)) dut4 (
    .rx_code(rx4), .corrected(cor4), .data(data4), .syndrome(syn4), .status(st4), .valid(vld4));

  function automatic logic [12:1] ref7(input logic [7:1] d);
    logic [12:1] c;
    c[3] = d[1]; c[5] = d[2]; c[6] = d[3]; c[7] = d[4];
    c[9] = d[5]; c[10] = d[6]; c[11] = d[7];
    c[1] = d[1] ^ d[2] ^ d[4] ^ d[5] ^ d[7];
    c[2] = d[1] ^ d[3] ^ d[4] ^ d[6] ^ d[7];
    c[4] = d[2] ^ d[3] ^ d[4];
    c[8] = d[5] ^ d[6] ^ d[7];
    c[12] = ^c[11:1];
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [12:1] c;
    rx4 = '0;
    // worked example, position 12 first
    rx = 12'b0_01100101110; @(posedge clk);
    check(st == ST_NO_ERROR && vld && syn == 0 && data == 7'b0110101 && cor == rx, "example: no error");
    rx = 12'b1_11011001001; @(posedge clk);
    check(st == ST_SINGLE && vld && syn == 11, $sformatf("example: single error C=%0d st=%s", syn, st.name()));
    check(cor == 12'b1_01011001001 && data == 7'b0101000, $sformatf("example: corrected %b data %b", cor, data));
    rx = 12'b0_01110110111; @(posedge clk);
    check(st == ST_DOUBLE && !vld && syn == 8, $sformatf("example: double error C=%0d st=%s", syn, st.name()));

    for (int v = 0; v < 128; v++) begin
      c = ref7(7'(v));
      rx = c; @(posedge clk);
      check(st == ST_NO_ERROR && vld && data == 7'(v) && cor == c, $sformatf("data %0d: clean word", v));
      for (int i = 1; i <= 12; i++) begin
        rx = c; rx[i] = ~rx[i]; @(posedge clk);
        if (i <= 11)
          check(st == ST_SINGLE && vld && syn == 4'(i) && cor == c && data == 7'(v),
                $sformatf("data %0d flip %0d: st=%s C=%0d data=%b", v, i, st.name(), syn, data));
        else
          check(st == ST_UNCLASSIFIED && !vld && syn == 0 && data == 7'(v),
                $sformatf("data %0d flip P9: st=%s", v, st.name()));
        for (int j = i + 1; j <= 12; j++) begin
          rx = c; rx[i] = ~rx[i]; rx[j] = ~rx[j]; @(posedge clk);
          check(st == ST_DOUBLE && !vld && cor == rx,
                $sformatf("data %0d flips %0d,%0d: st=%s", v, i, j, st.name()));
        end
      end
    end

    // (7,4) Hamming decoder without the overall parity bit
    for (int v = 0; v < 16; v++) begin
      for (int i = 0; i <= 7; i++) begin
        rx4 = ref4(4'(v));
        if (i > 0) rx4[i] = ~rx4[i];
        @(posedge clk);
        check(cor4 == ref4(4'(v)) && data4 == 4'(v) && vld4 && syn4 == 3'(i) &&
              st4 == (i == 0 ? ST_NO_ERROR : ST_SINGLE),
              $sformatf("(7,4) data %0d flip %0d: data=%b C=%0d", v, i, data4, syn4));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
