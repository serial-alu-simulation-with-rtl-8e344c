// alu_control: keeps the operation select lines steady for a whole operation.
//
// A serial operation spans several clocks, and the select lines S1/S0, ctrl
// and the carry-in must not change between its first and its last bit. While
// the ALU is idle the requested operation op_req is passed straight through,
// so the first (least significant) bit is already computed with it. On the
// edge that starts an operation (start = 1) the request is stored and busy is
// set; from then on the stored copy drives the datapath, whatever op_req does.
// busy drops on the edge after com, the completion signal fed back from the
// output register, and the next request is taken. rst clears busy.
//
// The design assigns this block the delivery of S0, S1 and ctrl and returns
// COM to it; holding the request in a register is this implementation's way
// of meeting that timing constraint.
module alu_control
  import serial_alu_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    start,   // first bit of an operation is stored at this edge
  input  logic    com,     // result complete
  input  alu_op_t op_req,  // requested operation
  output alu_op_t op,      // operation applied to the datapath
  output logic    busy     // an operation is in progress
);

  alu_op_t op_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      op_q <= '0;
    end else if (!busy && start) begin
      busy <= 1'b1;
      op_q <= op_req;
    end else if (busy && com) begin
      busy <= 1'b0;
    end
  end

  always_comb op = busy ? op_q : op_req;

  // Once an operation has started, the datapath sees the same operation until
  // completion.
  a_hold : assert property (@(posedge clk) disable iff (rst) (busy && !com) |=> op == $past(op))
    else $error("operation changed while busy");

endmodule
