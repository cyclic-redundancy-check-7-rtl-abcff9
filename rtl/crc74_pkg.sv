// crc74_pkg -- constants and types shared by the CRC(7,4) decoder and its
// testbenches.
//
// The code is a cyclic (7,4) code: a 4-bit data word becomes a 7-bit code
// word whose last three bits are the remainder of the data word (shifted
// left by three) divided modulo 2 by a 4-bit divisor.  The divisor's MSB is
// always 1, so only its three low bits travel as signals.  The default
// divisor 1011 (x^3 + x + 1) is the one the decoder is demonstrated with.
package crc74_pkg;

  localparam int unsigned CW_W  = 7;            // code word width n
  localparam int unsigned DW_W  = 4;            // data word width k
  localparam int unsigned REM_W = CW_W - DW_W;  // syndrome width n-k

  typedef logic [CW_W-1:0]  codeword_t;
  typedef logic [DW_W-1:0]  dataword_t;
  typedef logic [REM_W-1:0] syndrome_t;
  typedef logic [REM_W-1:0] divisor_low_t;      // divisor without its MSB

  // Divisor 1011: the low three bits as they are applied to dv2..dv0.
  localparam divisor_low_t DIVISOR_LOW_DEFAULT = 3'b011;

endpackage
