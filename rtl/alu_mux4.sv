// alu_mux4: one-bit 4-to-1 multiplexer.
//
// Used twice in the serial ALU: as multiplexer 1, which chooses the second
// operand bit of the full adder, and as multiplexer 2, which chooses one of
// the four logic-unit results. The selection follows the defining equations
// of the design: d0 when s0 = s1 = 0, d1 when s0 = 0 and s1 = 1, d2 when
// s0 = 1 and s1 = 0, d3 when both are 1. In other words the index is {s0, s1},
// with s0 as the more significant bit.
//
// Purely combinational; no clock.
module alu_mux4 (
  input  logic [3:0] d,   // data inputs d0..d3
  input  logic       s0,  // select, more significant
  input  logic       s1,  // select, less significant
  output logic       u    // selected bit
);

  always_comb begin
    unique case ({s0, s1})
      2'b00:   u = d[0];
      2'b01:   u = d[1];
      2'b10:   u = d[2];
      default: u = d[3];
    endcase
  end

endmodule
