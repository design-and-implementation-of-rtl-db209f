// Hamming SEC-DED decoder: detects and corrects the received code word.
//
// Four stages, all combinational:
//   1. checker_bit_generator recomputes the checker bits C (the syndrome) and
//      the overall parity check over the received word;
//   2. syndrome_decoder turns C into one-hot select lines, Y0 = "no error";
//   3. secded_classifier decides between no error, single error (correct it)
//      and double error (invalid), following the decoding flowchart;
//   4. error_corrector inverts the bit selected by the decoder when the
//      decision allows it.
// The corrected data bits are then read back from the data positions.
//
// Interface: rx_code[n] is received position n (the top bit is P9 when
// SECDED is set); corrected has the same layout; data[k] is Dk. The overall
// parity bit P9 is passed through uncorrected. With SECDED clear this is the
// plain Hamming decoder, which corrects every non-zero syndrome.
module hamming_decoder
  import hamming_pkg::*;
#(
  parameter int unsigned DATA_W = 7,
  parameter bit          SECDED = 1'b1,
  localparam int unsigned PAR_W  = parity_bits(DATA_W),
  localparam int unsigned CODE_W = DATA_W + PAR_W,
  localparam int unsigned OUT_W  = CODE_W + (SECDED ? 1 : 0)
) (
  input  logic [OUT_W:1]   rx_code,
  output logic [OUT_W:1]   corrected,
  output logic [DATA_W:1]  data,
  output logic [PAR_W-1:0] syndrome,
  output status_e          status,
  output logic             valid
);

  logic                  overall;
  logic [2**PAR_W-1:0]   sel;
  logic                  correct_en;
  logic [CODE_W:1]       fixed;

  checker_bit_generator #(.DATA_W(DATA_W), .SECDED(SECDED)) u_checker (
    .rx_code (rx_code),
    .syndrome(syndrome),
    .overall (overall)
  );

  syndrome_decoder #(.SEL_W(PAR_W)) u_dec (
    .sel(syndrome),
    .y  (sel)
  );

  secded_classifier #(.SECDED(SECDED)) u_class (
    .syndrome_nz(|syndrome),
    .overall    (overall),
    .status     (status),
    .valid      (valid),
    .correct_en (correct_en)
  );

  error_corrector #(.CODE_W(CODE_W), .SEL_N(2**PAR_W)) u_fix (
    .rx_code  (rx_code[CODE_W:1]),
    .sel      (sel),
    .enable   (correct_en),
    .corrected(fixed)
  );

  if (SECDED) begin : g_secded
    assign corrected = {rx_code[OUT_W], fixed};
  end else begin : g_plain
    assign corrected = fixed;
  end

  // read the data bits back from the non-power-of-two positions
  always_comb begin
    int unsigned k;
    data = '0;
    k = 1;
    for (int unsigned pos = 1; pos <= CODE_W; pos++) begin
      if (!is_pow2(pos)) begin
        data[k] = fixed[pos];
        k++;
      end
    end
  end

endmodule
