// serial_adder: the single full adder of the serial ALU and its carry flip-flop.
//
// One full adder serves every arithmetic operation, whatever the operand
// width: each clock it adds one bit of a, one bit k from the operand
// multiplexer and the carry left by the previous bit. For the least
// significant bit (first = 1) the external carry-in cin is used instead of the
// stored carry. On a clock edge with step = 1 the bit's carry-out is stored,
// so after the last bit the flip-flop holds the carry out of the whole word.
// The carry flip-flop is this design's own addition: a bit-serial adder needs
// one to pass the carry from one clock to the next.
//
// Timing: sum is combinational in the current bit; carry is
// registered. rst (synchronous) clears the stored carry.
module serial_adder (
  input  logic clk,
  input  logic rst,    // synchronous clear of the carry flip-flop
  input  logic first,  // current bit is the least significant: use cin
  input  logic step,   // store this bit's carry-out at the clock edge
  input  logic a,      // operand bit a
  input  logic k,      // second operand bit from multiplexer 1
  input  logic cin,    // carry into the least significant bit
  output logic sum,    // sum bit (u2)
  output logic carry   // stored carry: carry out of the last bit added
);

  logic c_in, c_out;

  always_comb begin
    c_in  = first ? cin : carry;
    sum   = a ^ k ^ c_in;
    c_out = (a & k) | (a & c_in) | (k & c_in);
  end

  always_ff @(posedge clk) begin
    if (rst)       carry <= 1'b0;
    else if (step) carry <= c_out;
  end

endmodule
