// tb_alu_mux4: exhaustive self-checking test of the 4-to-1 multiplexer.
// All 16 data patterns are applied with all four select codes; the expected
// bit is taken from the defining equations (d0 for s0 = s1 = 0, d1 for
// s0 = 0 and s1 = 1, d2 for s0 = 1 and s1 = 0, d3 for both 1).
module tb_alu_mux4;
  logic [3:0] d;
  logic       s0, s1, u;
  int checks = 0, failures = 0;

  alu_mux4 dut (.d(d), .s0(s0), .s1(s1), .u(u));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int pat = 0; pat < 16; pat++) begin
      for (int s = 0; s < 4; s++) begin
        d  = 4'(pat);
        s0 = s[1];
        s1 = s[0];
        #1;
        if (!s0 && !s1)      exp = d[0];
        else if (!s0 && s1)  exp = d[1];
        else if (s0 && !s1)  exp = d[2];
        else                 exp = d[3];
        checks++;
        if (u !== exp) begin
          failures++;
          $display("FAIL d=%b s0=%b s1=%b u=%b expected %b", d, s0, s1, u, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
