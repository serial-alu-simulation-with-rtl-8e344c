// serial_alu: bit-serial arithmetic and logic unit with a serial-to-parallel
// state machine.
//
// Instead of one full adder per bit, this ALU has a single full adder and a
// single set of logic gates, and feeds the operands through them one bit per
// clock, least significant bit first. A WIDTH-bit operation therefore takes
// WIDTH clocks of data plus one completion clock, and the hardware does not
// grow with WIDTH except for the result register.
//
// Datapath, per clock:
//   multiplexer 1 (alu_mux4) picks the adder's second operand from
//     {x, all ones, NOT x, zero}; serial_adder adds it to a with the carry
//     (cin for the first bit, the stored carry afterwards);
//   logic_unit forms a AND b, a OR b, a XOR b, NOT b; multiplexer 2 picks one;
//   multiplexer 3 (alu_mux2) passes the adder bit (ctrl = 0) or the logic bit
//     (ctrl = 1) as z;
//   s2p_fsm collects z into a word; output_register presents it as out2 with
//     the final carry as cout, and pulses com.
// Both 4:1 multiplexers are steered by the same S1/S0 lines, so with
// sel = {S1, S0} the operations are:
//   ctrl cin sel | out2              ctrl sel | out2
//    0    0  00  | a + x              1   00  | a AND b
//    0    0  01  | a - x - 1          1   01  | a OR b
//    0    0  10  | a - 1              1   10  | a XOR b
//    0    0  11  | a                  1   11  | NOT b
//    0    1  00  | a + x + 1
//    0    1  01  | a - x
//    0    1  10  | a
//    0    1  11  | a + 1
// (all modulo 2^WIDTH; cout is the carry out of the most significant bit).
//
// Interface and timing: hold r = 1 for one clock to restart; a restart
// returns the state machine to its start state and keeps the last result on
// out2 (out2 is undefined until the first operation completes). Present
// ctrl/cin/sel and bit 0 of a, x and b with the advance input adv = 1; on each
// rising edge with adv = 1 one bit is taken, so bit k must be on opa/opx/opb
// during the k-th advancing clock. The operation is sampled by alu_control
// with bit 0 and held until completion. After the WIDTH-th bit one more
// advancing edge loads out2/cout and raises com for one clock, and the next
// clock returns to the start state. With adv held at 1 an operation therefore
// takes WIDTH + 2 clocks, back to back. Holding adv = 0 pauses the machine.
// The structure, the multiplexer selection equations and the state machine
// follow the design description; the operand-multiplexer inputs, the carry
// flip-flop, the operation register and the output register's load timing
// are this implementation's choices.
module serial_alu
  import serial_alu_pkg::*;
#(
  parameter int unsigned WIDTH = ALU_WIDTH
) (
  input  logic             clk,
  input  logic             r,      // synchronous restart
  input  logic             adv,    // advance the state machine one bit
  input  logic             cin,    // carry into the least significant bit
  input  logic [1:0]       sel,    // {S1, S0}
  input  logic             ctrl,   // 0: arithmetic result, 1: logic result
  input  logic             opa,    // serial bit of operand a
  input  logic             opx,    // serial bit of operand x (arithmetic)
  input  logic             opb,    // serial bit of operand b (logic)
  output logic [WIDTH-1:0] out2,   // result word
  output logic             cout,   // carry out of the arithmetic operation
  output logic             com,    // result complete (one clock)
  output logic             busy    // an operation is in progress
);

  alu_op_t    op_req, op;
  logic       k, u2, u3, z;
  logic       y_and, y_or, y_xor, y_not;
  logic       first, shift, finish, done;
  logic       carry;
  logic [WIDTH-1:0] word;

  always_comb begin
    op_req.ctrl = ctrl;
    op_req.cin  = cin;
    op_req.sel  = sel;
  end

  alu_control u_control (
    .clk    (clk),
    .rst    (r),
    .start  (first && shift),
    .com    (com),
    .op_req (op_req),
    .op     (op),
    .busy   (busy)
  );

  // Multiplexer 1: index {S0, S1}: d0 = x, d1 = all ones, d2 = NOT x, d3 = zero.
  alu_mux4 u_mux1 (
    .d  ({1'b0, ~opx, 1'b1, opx}),
    .s0 (op.sel[0]),
    .s1 (op.sel[1]),
    .u  (k)
  );

  serial_adder u_fa (
    .clk   (clk),
    .rst   (r),
    .first (first),
    .step  (shift),
    .a     (opa),
    .k     (k),
    .cin   (op.cin),
    .sum   (u2),
    .carry (carry)
  );

  logic_unit u_lu (
    .a     (opa),
    .b     (opb),
    .y_and (y_and),
    .y_or  (y_or),
    .y_xor (y_xor),
    .y_not (y_not)
  );

  // Multiplexer 2: index {S0, S1}: d0 = AND, d1 = XOR, d2 = OR, d3 = NOT b.
  alu_mux4 u_mux2 (
    .d  ({y_not, y_or, y_xor, y_and}),
    .s0 (op.sel[0]),
    .s1 (op.sel[1]),
    .u  (u3)
  );

  alu_mux2 u_mux3 (
    .u2   (u2),
    .u3   (u3),
    .ctrl (op.ctrl),
    .z    (z)
  );

  s2p_fsm #(.WIDTH(WIDTH)) u_fsm (
    .clk    (clk),
    .r      (r),
    .a      (adv),
    .z      (z),
    .word   (word),
    .first  (first),
    .shift  (shift),
    .finish (finish),
    .done   (done)
  );

  output_register #(.WIDTH(WIDTH)) u_outreg (
    .clk  (clk),
    .load (finish),
    .d    (word),
    .c    (carry),
    .out2 (out2),
    .cout (cout),
    .com  (com)
  );

  // The edge that completes a word raises com and enters the completion state.
  a_com : assert property (@(posedge clk) finish |=> (com && done))
    else $error("com does not match the completion state");

endmodule
