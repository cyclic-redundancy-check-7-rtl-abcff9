// mod2_divider -- one step of modulo-2 (XOR) long division.
//
// The step takes a dividend of REM_W+1 bits and the REM_W low bits of the
// divisor (the divisor's MSB is always 1 and has no port).  When the
// dividend's MSB is 1 the divisor "goes into" it once, and the remainder is
// the dividend's low bits XOR the divisor's low bits; when the MSB is 0 the
// remainder is the dividend's low bits unchanged.  This is built exactly as
// the reference schematic draws it: each divisor bit is ANDed with the
// dividend MSB and the product is XORed into the matching dividend bit.
//
// Interface: dvd[REM_W] is the dividend MSB (DVD3 for REM_W = 3) down to
// dvd[0] (DVD0); dvs[REM_W-1:0] are DVS2..DVS0; rem[REM_W-1:0] are
// REM2..REM0.  Purely combinational, no clock.
//
// The 3-bit width is the published one; making it a parameter is this
// implementation's choice.
module mod2_divider #(
  parameter int unsigned REM_W = 3
) (
  input  logic [REM_W:0]   dvd,  // dividend, MSB first
  input  logic [REM_W-1:0] dvs,  // divisor without its leading 1
  output logic [REM_W-1:0] rem   // remainder
);

  logic [REM_W-1:0] subtrahend;  // divisor bits gated by the dividend MSB

  always_comb begin
    subtrahend = dvs & {REM_W{dvd[REM_W]}};
    rem        = dvd[REM_W-1:0] ^ subtrahend;
  end

endmodule
