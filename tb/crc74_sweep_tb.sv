// crc74_sweep_tb -- the decoder's demonstration run.
//
// Holds the divisor at 1011 (dv2..dv0 = 0,1,1) and the code word's four
// MSBs at 1001, and steps the three low code word bits through 000..111,
// one value every 10 time units.  accept must be 1 for exactly one step, the one
// with code word 1001_110, the only code word of the code in this range;
// the extracted data word must be 1001 throughout.
module crc74_sweep_tb;
  import crc74_pkg::*;

  codeword_t    cw;
  divisor_low_t dv;
  logic         accept;
  dataword_t    dataword;
  syndrome_t    syndrome;

  int checks = 0;
  int failures = 0;
  int n_accepted = 0;

  crc74_decoder dut (
    .cw(cw), .dv(dv), .accept(accept), .dataword(dataword),
    .syndrome(syndrome)
  );

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dv = 3'b011;
    for (int low = 0; low < 8; low++) begin
      cw = {4'b1001, 3'(low)};
      #5;
      checks++;
      if (accept !== (low == 3'b110) || dataword !== 4'b1001) begin
        failures++;
        $display("FAIL cw=%b accept=%b dataword=%b", cw, accept, dataword);
      end
      if (accept) n_accepted++;
      #5;
    end
    checks++;
    if (n_accepted != 1) begin
      failures++;
      $display("FAIL accept was 1 for %0d steps, expected 1", n_accepted);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
