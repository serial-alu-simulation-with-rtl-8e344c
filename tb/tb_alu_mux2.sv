// tb_alu_mux2: exhaustive self-checking test of the result multiplexer:
// z must be the adder bit u2 for ctrl = 0 and the logic bit u3 for ctrl = 1.
module tb_alu_mux2;
  logic u2, u3, ctrl, z;
  int checks = 0, failures = 0;

  alu_mux2 dut (.u2(u2), .u3(u3), .ctrl(ctrl), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {ctrl, u3, u2} = 3'(v);
      #1;
      checks++;
      if (z !== (v >= 4 ? u3 : u2)) begin
        failures++;
        $display("FAIL ctrl=%b u2=%b u3=%b z=%b", ctrl, u2, u3, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
