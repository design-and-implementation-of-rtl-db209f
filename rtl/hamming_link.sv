// Hamming SEC-DED link: encoder, serial channel with error injection, and
// correcting decoder, as one transmit/receive system.
//
// The message d is encoded into a Hamming code word with the overall parity
// bit appended (12 bits for 7 data bits). The transmitter multiplexes that
// word onto a single line one bit per clock while ten is high; the medium
// inverts the line bit in every cycle in which err is high; the receiver
// demultiplexes the line into a 12-bit register while ren is high. The
// decoder works on that register: it computes the checker bits C and the
// overall parity check, decides between no error, a corrected single error
// and a detected double error, and inverts the bit in error. The 7-segment
// output shows C as a hex digit, the position of a corrected single error.
//
// Interface: d[k-1] is data bit Dk. dh[n] is code position n of the
// detected and corrected word (dh[12] is P9). data_out, status and valid are
// the corrected data and the decision; frame_done pulses when the receive
// register has just taken in a whole frame.
//
// Timing: raise ten and ren together. Position n travels in the n-th enabled
// cycle, so a frame takes OUT_W clock cycles (12 at the defaults); frame_done
// is high one cycle after the last bit's edge, and dh, data_out, status,
// valid and error are valid from that cycle on (they follow the receive
// register combinationally). A pulse on err in the n-th cycle of a frame
// corrupts position n. There is no reset port: a low ten or ren returns the
// bit counters to position 1.
//
// The ports clk, d, ten, err, ren, dh and error are those of the reference
// design (which shows a 4-bit message with a 7-bit code); data_out, status,
// valid and frame_done are added here. The defaults follow the 7-bit main
// configuration; DATA_W = 4 with SECDED = 0 gives the 4-bit (7,4) link.
module hamming_link
  import hamming_pkg::*;
#(
  parameter int unsigned DATA_W = 7,
  parameter bit          SECDED = 1'b1,
  localparam int unsigned PAR_W  = parity_bits(DATA_W),
  localparam int unsigned CODE_W = DATA_W + PAR_W,
  localparam int unsigned OUT_W  = CODE_W + (SECDED ? 1 : 0)
) (
  input  logic              clk,
  input  logic [DATA_W-1:0] d,
  input  logic              ten,
  input  logic              err,
  input  logic              ren,
  output logic [OUT_W:1]    dh,
  output logic [6:0]        error,
  output logic [DATA_W-1:0] data_out,
  output status_e           status,
  output logic              valid,
  output logic              frame_done
);

  logic [OUT_W:1]   h;       // transmitted code word
  logic             mh;      // serial line at the transmitter
  logic             line_rx; // serial line at the receiver
  logic [OUT_W:1]   dmh;     // received code word
  logic [DATA_W:1]  dec_data;
  logic [PAR_W-1:0] syndrome;
  logic [3:0]       digit;

  hamming_encoder #(.DATA_W(DATA_W), .SECDED(SECDED)) u_enc (
    .data(d),
    .code(h)
  );

  serial_transmitter #(.FRAME_W(OUT_W)) u_tx (
    .clk (clk),
    .ten (ten),
    .h   (h),
    .mh  (mh)
  );

  error_injector u_medium (
    .line_in (mh),
    .err     (err),
    .line_out(line_rx)
  );

  serial_receiver #(.FRAME_W(OUT_W)) u_rx (
    .clk       (clk),
    .ren       (ren),
    .line      (line_rx),
    .dmh       (dmh),
    .frame_done(frame_done)
  );

  hamming_decoder #(.DATA_W(DATA_W), .SECDED(SECDED)) u_dec (
    .rx_code  (dmh),
    .corrected(dh),
    .data     (dec_data),
    .syndrome (syndrome),
    .status   (status),
    .valid    (valid)
  );

  assign data_out = dec_data;

  // the display shows one hex digit: the low four bits of C
  if (PAR_W >= 4) begin : g_digit_wide
    assign digit = syndrome[3:0];
  end else begin : g_digit_narrow
    assign digit = {{(4 - PAR_W){1'b0}}, syndrome};
  end

  seven_seg_display u_seg (
    .value(digit),
    .seg  (error)
  );

endmodule
