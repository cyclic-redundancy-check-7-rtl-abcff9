// mod2_divider_tb -- exhaustive check of one modulo-2 division step.
//
// Drives all 16 dividends against all 8 divisor low-bit patterns and
// compares the remainder with an integer model: if the dividend is 8 or
// more the 4-bit divisor (8 + dvs) is XORed in, and the remainder is the
// low three bits.  It also replays the three division steps of the worked
// example 1001110 / 1011 (remainders 010, 101, 000).  The block is
// combinational; each check samples 1 ns after the inputs change.
module mod2_divider_tb;
  logic [3:0] dvd;
  logic [2:0] dvs;
  logic [2:0] rem;
  int checks = 0;
  int failures = 0;

  mod2_divider dut (.dvd(dvd), .dvs(dvs), .rem(rem));

  function automatic logic [2:0] model(int unsigned d, int unsigned s);
    int unsigned r;
    r = (d >= 8) ? (d ^ (8 + s)) : d;
    return 3'(r % 8);
  endfunction

  task automatic check(input logic [3:0] d, input logic [2:0] s,
                       input logic [2:0] expected);
    dvd = d;
    dvs = s;
    #1;
    checks++;
    if (rem !== expected) begin
      failures++;
      $display("FAIL dvd=%b dvs=%b rem=%b expected=%b", d, s, rem, expected);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++)
      for (int s = 0; s < 8; s++)
        check(4'(d), 3'(s), model(d, s));
    // Worked example, divisor 1011.
    check(4'b1001, 3'b011, 3'b010);
    check(4'b0101, 3'b011, 3'b101);
    check(4'b1011, 3'b011, 3'b000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
