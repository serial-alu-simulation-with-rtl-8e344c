// logic_unit: the bitwise half of the serial ALU.
//
// For the current bit pair (a, b) it forms the four logic functions of the
// design in parallel: a AND b, a OR b, a XOR b and NOT b. All four are
// presented at once; multiplexer 2, steered by the same S1/S0 lines as the
// adder's operand multiplexer, picks one of them.
//
// Purely combinational; one bit per clock when driven by serial operands.
module logic_unit (
  input  logic a,      // operand bit a
  input  logic b,      // operand bit b
  output logic y_and,  // a AND b
  output logic y_or,   // a OR b
  output logic y_xor,  // a XOR b
  output logic y_not   // NOT b
);

  always_comb begin
    y_and = a & b;
    y_or  = a | b;
    y_xor = a ^ b;
    y_not = ~b;
  end

endmodule
