// lp_adder_cell: 1-bit full-adder cell of the carry look-ahead adder.
//
// Sum and carry are formed by two independent paths from the same three
// inputs: sum = a ^ b ^ cin, and carry = a&b | cin&(a|b). Neither output is
// derived from the other, so the two paths can evaluate in parallel.
// Purely combinational.
//
// The document specifies a low-power 1-bit adder cell with separate sum and
// carry paths; only its logic function is modelled here, not its transistor
// circuit.
module lp_adder_cell (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | (cin & (a | b));
endmodule
