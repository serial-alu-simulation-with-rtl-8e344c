// serial_alu_pkg: types and constants shared by the serial ALU blocks.
//
// The serial ALU processes its operands one bit per clock, least significant
// bit first. An operation is chosen by four control bits, grouped here in
// alu_op_t: ctrl picks the arithmetic (0) or logic (1) result, cin is the
// carry into the least significant bit, and sel = {S1, S0} picks one of four
// arithmetic or logic functions. The 4-bit operand width is the size the
// design was demonstrated at; every block takes it as a parameter.
package serial_alu_pkg;

  // Operand width used throughout the design (number of serial bits per operation).
  localparam int unsigned ALU_WIDTH = 4;

  // sel[1] is S1 and sel[0] is S0, in the column order of the operation table.
  typedef struct packed {
    logic       ctrl;
    logic       cin;
    logic [1:0] sel;
  } alu_op_t;

endpackage
