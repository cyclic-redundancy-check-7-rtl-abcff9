// crc74_decoder_tb -- end-to-end check of the CRC(7,4) decoder at its
// default size (7-bit code word, 4-bit data word, 3-bit syndrome).
//
// Five groups of checks, all against values worked out here, not by the
// decoder's own structure:
//   1. the 16-entry code book of the code with divisor 1011: every code word
//      is accepted, its syndrome is 000 and its data word is returned;
//   2. the two worked examples: 1001110 (syndrome 000, accepted) and
//      1000110 (syndrome 011, discarded);
//   3. the demonstration sweep: divisor 1011, code word 1001_000 to
//      1001_111; accept must be 1 only for 1001_110;
//   4. all 128 code words against all 8 divisors (leading 1 implied),
//      compared with a bit-serial long-division model;
//   5. every 1-bit and 2-bit error on every code book word is detected.
// The decoder is combinational; each check samples 1 ns after the inputs
// change.  The two outcomes the decoder has, "accepted" and "discarded",
// are counted, and a run in which either never happens is a failure.
module crc74_decoder_tb;
  import crc74_pkg::*;

  codeword_t    cw;
  divisor_low_t dv;
  logic         accept;
  dataword_t    dataword;
  syndrome_t    syndrome;

  int checks = 0;
  int failures = 0;
  int n_accepted = 0;
  int n_discarded = 0;

  crc74_decoder dut (
    .cw(cw), .dv(dv), .accept(accept), .dataword(dataword),
    .syndrome(syndrome)
  );

  // Code book for divisor 1011, indexed by data word.
  localparam logic [6:0] CODEBOOK [16] = '{
    7'b0000000, 7'b0001011, 7'b0010110, 7'b0011101,
    7'b0100111, 7'b0101100, 7'b0110001, 7'b0111010,
    7'b1000101, 7'b1001110, 7'b1010011, 7'b1011000,
    7'b1100010, 7'b1101001, 7'b1110100, 7'b1111111
  };

  // Remainder of code word c divided modulo 2 by the divisor {1, d},
  // computed one bit at a time from the MSB down.
  function automatic logic [2:0] long_div(int unsigned c, int unsigned d);
    int unsigned r = c;
    int unsigned divisor = 8 + d;
    for (int b = 6; b >= 3; b--)
      if (((r >> b) & 1) == 1) r = r ^ (divisor << (b - 3));
    return 3'(r);
  endfunction

  task automatic apply(input codeword_t c, input divisor_low_t d);
    cw = c;
    dv = d;
    #1;
    if (accept) n_accepted++;
    else n_discarded++;
  endtask

  task automatic expect_out(input string what, input logic exp_accept,
                            input syndrome_t exp_syn);
    checks++;
    if (accept !== exp_accept || syndrome !== exp_syn ||
        dataword !== cw[6:3]) begin
      failures++;
      $display("FAIL %s cw=%b dv=%b accept=%b syndrome=%b dataword=%b (expected accept=%b syndrome=%b)",
               what, cw, dv, accept, syndrome, dataword, exp_accept, exp_syn);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1. Code book.
    for (int w = 0; w < 16; w++) begin
      apply(CODEBOOK[w], DIVISOR_LOW_DEFAULT);
      expect_out("codebook", 1'b1, 3'b000);
      checks++;
      if (dataword !== 4'(w)) begin
        failures++;
        $display("FAIL codebook word %0d gave data word %b", w, dataword);
      end
    end

    // 2. Worked examples.
    apply(7'b1001110, 3'b011);
    expect_out("example 1", 1'b1, 3'b000);
    apply(7'b1000110, 3'b011);
    expect_out("example 2", 1'b0, 3'b011);

    // 3. Demonstration sweep 1001_000 .. 1001_111, divisor 1011.
    for (int low = 0; low < 8; low++) begin
      apply({4'b1001, 3'(low)}, 3'b011);
      checks++;
      if (accept !== (low == 6)) begin
        failures++;
        $display("FAIL sweep cw=%b accept=%b", cw, accept);
      end
    end

    // 4. Exhaustive against the long-division model.
    for (int d = 0; d < 8; d++)
      for (int c = 0; c < 128; c++) begin
        logic [2:0] r;
        r = long_div(c, d);
        apply(7'(c), 3'(d));
        expect_out("exhaustive", r == 3'b000, r);
      end

    // 5. Every 1- and 2-bit error on every code word is detected.
    for (int w = 0; w < 16; w++)
      for (int i = 0; i < 7; i++)
        for (int j = i; j < 7; j++) begin
          logic [6:0] err;
          err = (7'b1 << i) | (7'b1 << j);
          apply(CODEBOOK[w] ^ err, DIVISOR_LOW_DEFAULT);
          checks++;
          if (accept !== 1'b0) begin
            failures++;
            $display("FAIL error pattern %b on %b not detected", err, CODEBOOK[w]);
          end
        end

    // Both outcomes must have occurred.
    checks++;
    if (n_accepted == 0) begin
      failures++;
      $display("FAIL no code word was accepted");
    end
    checks++;
    if (n_discarded == 0) begin
      failures++;
      $display("FAIL no code word was discarded");
    end
    $display("accepted=%0d discarded=%0d", n_accepted, n_discarded);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
