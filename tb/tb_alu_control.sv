// tb_alu_control: self-checking test of the operation-holding control unit.
// While idle the requested operation must reach the datapath unchanged; after
// a start edge the operation sampled on that edge must be held, whatever the
// request does, until the edge after com; rst must return the unit to idle.
module tb_alu_control;
  import serial_alu_pkg::*;
  logic clk = 1'b0;
  logic rst, start, com, busy;
  alu_op_t op_req, op, held;
  int checks = 0, failures = 0;

  alu_control dut (.clk(clk), .rst(rst), .start(start), .com(com), .op_req(op_req),
                   .op(op), .busy(busy));

  always #10 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; com = 1'b0; op_req = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int n = 0; n < 100; n++) begin
      // Idle for a few clocks: pass-through.
      repeat ($urandom_range(0, 3)) begin
        op_req = alu_op_t'($urandom);
        #1;
        check("idle busy", 4'(busy), 4'(1'b0));
        check("idle pass-through", 4'(op), 4'(op_req));
        @(posedge clk); #1;
      end
      // Start an operation.
      op_req = alu_op_t'($urandom);
      start  = 1'b1;
      held   = op_req;
      #1;
      check("first bit uses request", 4'(op), 4'(held));
      @(posedge clk); #1;
      start = 1'b0;
      // Busy for five clocks with a changing request; com in the last.
      for (int i = 0; i < 5; i++) begin
        op_req = alu_op_t'($urandom);
        start  = 1'($urandom);
        com    = (i == 4);
        #1;
        check("busy", 4'(busy), 4'(1'b1));
        check("held operation", 4'(op), 4'(held));
        @(posedge clk); #1;
      end
      com = 1'b0; start = 1'b0;
      #1;
      check("released after com", 4'(busy), 4'(1'b0));
      if (n % 10 == 9) begin
        start = 1'b1;
        @(posedge clk); #1;
        start = 1'b0;
        rst = 1'b1;
        @(posedge clk); #1;
        rst = 1'b0;
        check("rst clears busy", 4'(busy), 4'(1'b0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
