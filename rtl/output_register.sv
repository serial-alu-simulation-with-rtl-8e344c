// output_register: holds the finished result of the serial ALU.
//
// When the state machine completes a word (load = 1 at a clock edge) the
// register takes the collected word as out2 and the stored adder carry as
// cout, and raises com for the following clock cycle. out2 and cout then stay
// unchanged until the next operation completes, so the result is stable while
// the next one is being computed. com is therefore a one-cycle pulse that
// coincides with the completion state of the state machine; it tells the
// control unit and the outside world that a result is ready and new data can
// be accepted. There is no reset: a restart of the state machine leaves the
// last result on out2, and com falls by itself one clock after each load.
// out2 and cout are undefined until the first operation completes.
module output_register #(
  parameter int unsigned WIDTH = serial_alu_pkg::ALU_WIDTH
) (
  input  logic             clk,
  input  logic             load,   // completion edge
  input  logic [WIDTH-1:0] d,      // collected word
  input  logic             c,      // carry out of the most significant bit
  output logic [WIDTH-1:0] out2,   // result word
  output logic             cout,   // carry out of the arithmetic operation
  output logic             com     // result complete (one cycle)
);

  always_ff @(posedge clk) begin
    com <= load;
    if (load) begin
      out2 <= d;
      cout <= c;
    end
  end

endmodule
