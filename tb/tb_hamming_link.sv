// End-to-end testbench for hamming_link at its default size (7 data bits,
// 12-bit SEC-DED word sent serially).
//
// Every 7-bit message is sent once without error, once with each of the 12
// single-bit errors and once with each of the 66 double-bit errors, the errors
// being injected by pulsing err in the cycle that carries the chosen code
// position. After each frame the testbench checks, against a reference
// encoder written from the parity equations:
//   - frame_done arrives exactly 12 clock cycles after ten/ren rise;
//   - no error: dh is the sent word, data_out the message, valid high;
//   - a single error in positions 1..11: corrected to the sent word and
//     message, status single error, the display shows the position in hex;
//   - an error in P9 alone: reported unclassified and invalid;
//   - a double error: reported invalid and left uncorrected, the display
//     shows the XOR of the two positions (positions 1..11 only).
// It also keeps both enables high over several frames to check that the
// link repeats the word with a frame_done every 12 cycles. Each of these
// mechanisms is counted, and one that never happened is a failure.
module tb_hamming_link;
  import hamming_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [6:0]  d;
  logic        ten, err, ren;
  logic [12:1] dh;
  logic [6:0]  error;
  logic [6:0]  data_out;
  status_e     status;
  logic        valid;
  logic        frame_done;

  hamming_link dut (
    .clk(clk), .d(d), .ten(ten), .err(err), .ren(ren),
    .dh(dh), .error(error), .data_out(data_out), .status(status), .valid(valid),
    .frame_done(frame_done)
  );

  int n_clean = 0, n_single = 0, n_p9 = 0, n_double = 0, n_stream = 0, n_latency = 0;

  function automatic logic [12:1] ref7(input logic [7:1] m);
    logic [12:1] c;
    c[3] = m[1]; c[5] = m[2]; c[6] = m[3]; c[7] = m[4];
    c[9] = m[5]; c[10] = m[6]; c[11] = m[7];
    c[1] = m[1] ^ m[2] ^ m[4] ^ m[5] ^ m[7];
    c[2] = m[1] ^ m[3] ^ m[4] ^ m[6] ^ m[7];
    c[4] = m[2] ^ m[3] ^ m[4];
    c[8] = m[5] ^ m[6] ^ m[7];
    c[12] = ^c[11:1];
    return c;
  endfunction

  string glyph [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                        "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] segs_of(input logic [3:0] digit);
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send message m once with the code positions set in mask inverted on the
  // line, and check what the receiver makes of it.
  task automatic send(input logic [6:0] m, input logic [12:1] mask);
    logic [12:1] c, rxw;
    int cycles, pos, nflip;
    c = ref7(m);
    rxw = c ^ mask;
    nflip = $countones(mask);
    pos = 0;
    for (int i = 1; i <= 11; i++) if (mask[i]) pos ^= i;
    d = m;
    ten = 1'b1;
    ren = 1'b1;
    cycles = 0;
    for (int n = 1; n <= 12; n++) begin
      err = mask[n];
      @(negedge clk);
      cycles++;
      if (frame_done) break;
    end
    err = 1'b0;
    ten = 1'b0;
    ren = 1'b0;
    check(frame_done && cycles == 12, $sformatf("frame_done after %0d cycles, expected 12", cycles));
    if (frame_done && cycles == 12) n_latency++;
    check(error == segs_of(4'(pos)), $sformatf("msg %b mask %b: display %b, expected digit %0d", m, mask, error, pos));
    if (nflip == 0) begin
      check(status == ST_NO_ERROR && valid && dh == c && data_out == m,
            $sformatf("msg %b clean: status %s dh %b data %b", m, status.name(), dh, data_out));
      n_clean++;
    end else if (nflip == 1 && !mask[12]) begin
      check(status == ST_SINGLE && valid && dh == c && data_out == m,
            $sformatf("msg %b mask %b: status %s dh %b data %b", m, mask, status.name(), dh, data_out));
      n_single++;
    end else if (nflip == 1) begin
      check(status == ST_UNCLASSIFIED && !valid && dh == rxw,
            $sformatf("msg %b P9 error: status %s", m, status.name()));
      n_p9++;
    end else begin
      check(status == ST_DOUBLE && !valid && dh == rxw,
            $sformatf("msg %b mask %b: status %s dh %b", m, mask, status.name(), dh));
      n_double++;
    end
    @(negedge clk);
  endtask

  initial begin
    int done_cycles [$];
    d = '0;
    ten = 1'b0;
    ren = 1'b0;
    err = 1'b0;
    repeat (3) @(negedge clk);

    for (int v = 0; v < 128; v++) begin
      send(7'(v), '0);
      for (int i = 1; i <= 12; i++) begin
        send(7'(v), 12'(1) << (i - 1));
        for (int j = i + 1; j <= 12; j++)
          send(7'(v), (12'(1) << (i - 1)) | (12'(1) << (j - 1)));
      end
    end

    // streaming: both enables held for four frames, an error in frame 3
    d = 7'b0110101;
    ten = 1'b1;
    ren = 1'b1;
    for (int n = 1; n <= 48; n++) begin
      err = (n == 24 + 5);
      @(negedge clk);
      if (frame_done) begin
        done_cycles.push_back(n);
        if (n == 36)
          check(status == ST_SINGLE && valid && dh == ref7(d) && error == segs_of(4'd5),
                $sformatf("stream frame 3: status %s", status.name()));
        else
          check(status == ST_NO_ERROR && valid && dh == ref7(d),
                $sformatf("stream frame ending at %0d: status %s", n, status.name()));
      end
    end
    ten = 1'b0;
    ren = 1'b0;
    err = 1'b0;
    check(done_cycles.size() == 4 && done_cycles[0] == 12 && done_cycles[1] == 24 &&
          done_cycles[2] == 36 && done_cycles[3] == 48,
          $sformatf("streaming frame_done count %0d", done_cycles.size()));
    if (done_cycles.size() == 4) n_stream++;

    $display("frames: clean %0d, single corrected %0d, P9-only %0d, double detected %0d, on-time %0d, streams %0d",
             n_clean, n_single, n_p9, n_double, n_latency, n_stream);
    check(n_clean > 0, "no error-free frame");
    check(n_single > 0, "no corrected single error");
    check(n_p9 > 0, "no P9-only error");
    check(n_double > 0, "no detected double error");
    check(n_stream > 0, "no streaming run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
