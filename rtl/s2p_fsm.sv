// s2p_fsm: clocked state machine that turns the serial result into a word.
//
// The machine has WIDTH+2 states. S0 is the start state; S1..S(WIDTH) mean
// that 1..WIDTH result bits have been collected; S(WIDTH+1) is the completion
// state (S5 for the 4-bit design) whose Moore output raises COM. Transitions,
// all on the rising clock edge:
//   r = 1                       -> S0 from every state
//   S0..S(WIDTH), r = 0, a = 1  -> next state
//   S0..S(WIDTH), r = 0, a = 0  -> stay
//   S(WIDTH+1)                  -> S0 (on r, on a = 0, and on r = 0 with a = 1)
// Leaving Sk for k < WIDTH stores the serial bit z at position k of the word,
// so the word fills from bit 0 upwards (least significant bit first). Leaving
// S(WIDTH) stores nothing and pulses finish, which loads the output register.
// The state list, the a/r transition conditions and the S5 output follow the
// design's state diagram. r restarts the sequence but leaves the word as it
// is, as in the published simulation. Holding in S1..S4 while a = 0 is this
// implementation's choice.
//
// Outputs: first marks the cycle whose bit is the least significant (S0),
// shift marks an edge that stores a bit (the adder stores its carry on the
// same edge), finish marks the edge that completes the word, done is high in
// the completion state.
module s2p_fsm #(
  parameter int unsigned WIDTH = serial_alu_pkg::ALU_WIDTH
) (
  input  logic             clk,
  input  logic             r,       // synchronous restart to S0
  input  logic             a,       // advance: step to the next state
  input  logic             z,       // serial data bit
  output logic [WIDTH-1:0] word,    // collected bits (z1)
  output logic             first,   // in S0: current bit is the least significant
  output logic             shift,   // this edge stores z into the word
  output logic             finish,  // this edge completes the word
  output logic             done     // in the completion state
);

  localparam int unsigned SW = $clog2(WIDTH + 2);
  localparam logic [SW-1:0] S_LAST = SW'(WIDTH);      // all bits collected
  localparam logic [SW-1:0] S_DONE = SW'(WIDTH + 1);  // completion, COM state

  logic [SW-1:0] state;
  logic          adv;

  always_comb begin
    adv    = a && !r;
    first  = (state == '0);
    shift  = adv && (state < S_LAST);
    finish = adv && (state == S_LAST);
    done   = (state == S_DONE);
  end

  always_ff @(posedge clk) begin
    if (r) begin
      state <= '0;
    end else if (state == S_DONE) begin
      state <= '0;
    end else if (adv) begin
      for (int unsigned i = 0; i < WIDTH; i++)
        if (state == SW'(i)) word[i] <= z;
      state <= state + 1'b1;
    end
  end

endmodule
