// alu_mux2: the result multiplexer of the serial ALU (multiplexer 3).
//
// Passes the full-adder sum bit u2 when ctrl = 0 and the logic-unit bit u3
// when ctrl = 1. Its output z is the serial data stream that the
// serial-to-parallel state machine collects.
//
// Purely combinational; no clock.
module alu_mux2 (
  input  logic u2,    // arithmetic bit (full-adder sum)
  input  logic u3,    // logic bit (selected logic-unit result)
  input  logic ctrl,  // 0: arithmetic, 1: logic
  output logic z      // serial result bit
);

  always_comb z = ctrl ? u3 : u2;

endmodule
