// nor3 -- three-input NOR gate that flags an all-zero syndrome.
//
// Built the way the reference subcircuit is drawn: two 2-input ORs in a
// chain (a|b, then |c) followed by an inverter.  y is 1 only when a, b and c
// are all 0.  Ports follow the symbol: A, B, C in, OUT out.  Purely
// combinational.
module nor3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  logic or_ab;
  logic or_abc;

  always_comb begin
    or_ab  = a | b;
    or_abc = or_ab | c;
    y      = ~or_abc;
  end

endmodule
