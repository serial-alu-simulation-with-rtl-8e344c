// tb_output_register: self-checking test of the result register.
// Random words are loaded at random clocks; out2 and cout must take the new
// values only on a load edge and hold them otherwise, and com must be high
// exactly in the clock after each load.
module tb_output_register;
  localparam int W = 4;
  logic clk = 1'b0;
  logic load, c, cout, com;
  logic [W-1:0] d, out2;
  logic [W-1:0] exp_out;
  logic exp_c, exp_com;
  int checks = 0, failures = 0, loads = 0;

  output_register #(.WIDTH(W)) dut (.clk(clk), .load(load), .d(d), .c(c),
                                    .out2(out2), .cout(cout), .com(com));

  always #10 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // First load defines the register contents.
    load = 1'b1; d = 4'b1110; c = 1'b1;
    @(posedge clk); #1;
    exp_out = d; exp_c = c; exp_com = 1'b1;
    for (int i = 0; i < 500; i++) begin
      checks++;
      if (out2 !== exp_out || cout !== exp_c || com !== exp_com) begin
        failures++;
        $display("FAIL cycle %0d: out2=%b cout=%b com=%b expected %b %b %b",
                 i, out2, cout, com, exp_out, exp_c, exp_com);
      end
      load = 1'($urandom_range(0, 3) == 0);
      d    = W'($urandom);
      c    = 1'($urandom);
      @(posedge clk); #1;
      exp_com = load;
      if (load) begin
        exp_out = d; exp_c = c; loads++;
      end
    end
    checks++;
    if (loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
