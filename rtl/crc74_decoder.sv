// crc74_decoder -- parallel CRC(7,4) decoder (syndrome check).
//
// A received 7-bit code word is divided modulo 2 by a 4-bit divisor whose
// MSB is 1.  The division is unrolled into K = 4 chained mod2_divider
// stages, one per quotient bit, so the whole code word is checked at once,
// with no shift register:
//   stage 0 divides code word bits cw[6:3];
//   stage i (i = 1..3) divides {remainder of stage i-1, cw[3-i]}, i.e. each
//   step brings down the next code word bit, as in long division by hand.
// The remainder of the last stage is the syndrome.  A three-input NOR
// (nor3) turns syndrome == 000 into accept = 1.  The data word is the code
// word's four MSBs; it is valid only while accept is 1, and the consumer
// discards it otherwise.  With divisor 1011 every code word of the code has
// syndrome 000, and because the code's minimum Hamming distance is 3 every
// 1- or 2-bit error gives a non-zero syndrome.
//
// Interface: cw[6:0] is the code word (cw6..cw0, MSB first); dv[2:0] are
// the divisor's three low bits (dv2..dv0; the leading 1 is implied).
// Outputs: accept, dataword[3:0] = cw[6:3], and syndrome[2:0].
// Timing: purely combinational, four stage delays plus the NOR from cw to
// accept; there is no clock or reset.
//
// The stage structure, the stage-to-stage wiring, the divisor input and the
// NOR follow the reference design.  Bringing the data word and syndrome out
// as ports, and the N/K parameters (with a plain reduction NOR replacing
// nor3 if N-K is not 3), are this implementation's choices.  The
// analog-to-digital input bridges and digital-to-analog output bridge of
// the reference simulation have no logic function and are not part of it.
module crc74_decoder #(
  parameter int unsigned N = crc74_pkg::CW_W,  // code word width
  parameter int unsigned K = crc74_pkg::DW_W   // data word width
) (
  input  logic [N-1:0]   cw,        // received code word, MSB first
  input  logic [N-K-1:0] dv,        // divisor bits below its leading 1
  output logic           accept,    // 1: syndrome is zero, data word valid
  output logic [K-1:0]   dataword,  // extracted data word = cw[N-1 -: K]
  output logic [N-K-1:0] syndrome   // remainder of cw / divisor
);

  localparam int unsigned R = N - K;  // remainder / syndrome width

  // Remainder after each division stage.
  logic [R-1:0] stage_rem [K];

  for (genvar i = 0; i < int'(K); i++) begin : g_stage
    logic [R:0] dividend;
    if (i == 0) begin : g_first
      assign dividend = cw[N-1 -: R+1];
    end else begin : g_next
      // Previous remainder, then the next code word bit brought down.
      assign dividend = {stage_rem[i-1], cw[K-1-i]};
    end
    mod2_divider #(.REM_W(R)) u_div (
      .dvd(dividend),
      .dvs(dv),
      .rem(stage_rem[i])
    );
  end

  assign syndrome = stage_rem[K-1];
  assign dataword = cw[N-1 -: K];

  if (R == 3) begin : g_nor3
    nor3 u_nor (
      .a(syndrome[2]),
      .b(syndrome[1]),
      .c(syndrome[0]),
      .y(accept)
    );
  end else begin : g_nor_n
    assign accept = ~|syndrome;
  end

endmodule
