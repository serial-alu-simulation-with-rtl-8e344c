// tb_serial_alu_wide: runs the serial ALU at operand widths 8 and 16, side by
// side, with random operations from the full operation table. The circuit is
// unchanged apart from the width parameter; each operation must complete in
// WIDTH + 1 clocks after its first bit.
module tb_serial_alu_wide;
  logic clk = 1'b0;
  logic fin8, fin16;
  int   c8, f8, c16, f16;
  int   checks, failures;

  serial_alu_runner #(.W(8),  .N_OPS(300)) u8  (.clk(clk), .finished(fin8),  .checks(c8),  .failures(f8));
  serial_alu_runner #(.W(16), .N_OPS(300)) u16 (.clk(clk), .finished(fin16), .checks(c16), .failures(f16));

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    checks = c8 + c16;
    failures = f8 + f16 + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (fin8 && fin16);
    checks = c8 + c16;
    failures = f8 + f16;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
