// nor3_tb -- truth-table check of the three-input NOR.
//
// Applies all eight input combinations and compares y with a literal truth
// table in which only input 000 gives 1.  Combinational: each check samples
// 1 ns after the inputs change.
module nor3_tb;
  logic a, b, c, y;
  int checks = 0;
  int failures = 0;
  // Expected y for {a,b,c} = 0..7.
  localparam logic [7:0] TRUTH = 8'b0000_0001;

  nor3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if (y !== TRUTH[i]) begin
        failures++;
        $display("FAIL abc=%b y=%b expected=%b", 3'(i), y, TRUTH[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
