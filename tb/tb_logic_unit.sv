// tb_logic_unit: exhaustive self-checking test of the logic unit against
// written-out truth tables of AND, OR, XOR and NOT b.
module tb_logic_unit;
  logic a, b, y_and, y_or, y_xor, y_not;
  int checks = 0, failures = 0;

  // Truth tables indexed by {a, b}.
  localparam logic [3:0] T_AND = 4'b1000;
  localparam logic [3:0] T_OR  = 4'b1110;
  localparam logic [3:0] T_XOR = 4'b0110;
  localparam logic [3:0] T_NOT = 4'b0101;

  logic_unit dut (.a(a), .b(b), .y_and(y_and), .y_or(y_or), .y_xor(y_xor), .y_not(y_not));

  task automatic check(string name, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%b b=%b got %b expected %b", name, a, b, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      check("and", y_and, T_AND[v]);
      check("or",  y_or,  T_OR[v]);
      check("xor", y_xor, T_XOR[v]);
      check("not", y_not, T_NOT[v]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
