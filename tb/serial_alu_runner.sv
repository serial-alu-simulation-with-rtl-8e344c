// serial_alu_runner: drives one serial_alu instance of width W with random
// operations and checks each result. Used by tb_serial_alu_wide to show that
// the same circuit handles longer operands, at W + 2 clocks per operation.
//
// Expected values are plain integer arithmetic on W-bit operands (the same
// operation table as the 4-bit design). After N_OPS operations finished goes
// high; checks and failures hold the counts.
module serial_alu_runner #(
  parameter int W     = 8,
  parameter int N_OPS = 300
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);
  logic r, adv, cin, ctrl, opa, opx, opb, cout, com, busy;
  logic [1:0]   sel;
  logic [W-1:0] out2;

  serial_alu #(.WIDTH(W)) dut (.clk(clk), .r(r), .adv(adv), .cin(cin), .sel(sel),
                               .ctrl(ctrl), .opa(opa), .opx(opx), .opb(opb), .out2(out2),
                               .cout(cout), .com(com), .busy(busy));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL W=%0d %0t %s: got %0d expected %0d", W, $time, what, got, exp);
    end
  endtask

  initial begin
    automatic longint m = longint'(1) << W;
    longint a, x, b, res;
    logic   co;
    int     cycles;
    finished = 1'b0; checks = 0; failures = 0;
    r = 1'b1; adv = 1'b0; cin = 1'b0; ctrl = 1'b0; sel = '0; opa = 1'b0; opx = 1'b0; opb = 1'b0;
    @(posedge clk); #1;
    r = 1'b0;
    for (int n = 0; n < N_OPS; n++) begin
      a = longint'($urandom) % m; x = longint'($urandom) % m; b = longint'($urandom) % m;
      {cin, ctrl, sel} = 4'($urandom);
      if (n < 16) {cin, ctrl, sel} = 4'(n);
      if (ctrl) begin
        co = 1'b0;
        case (sel)
          2'b00:   res = a & b;
          2'b01:   res = a | b;
          2'b10:   res = a ^ b;
          default: res = ~b;
        endcase
      end else begin
        case ({cin, sel})
          3'b000:  begin res = a + x;     co = (a + x >= m);     end
          3'b001:  begin res = a - x - 1; co = (a > x);          end
          3'b010:  begin res = a - 1;     co = (a != 0);         end
          3'b011:  begin res = a;         co = 1'b0;             end
          3'b100:  begin res = a + x + 1; co = (a + x + 1 >= m); end
          3'b101:  begin res = a - x;     co = (a >= x);         end
          3'b110:  begin res = a;         co = 1'b1;             end
          default: begin res = a + 1;     co = (a == m - 1);     end
        endcase
      end
      res = ((res % m) + m) % m;
      cycles = 0;
      adv = 1'b1;
      for (int i = 0; i <= W; i++) begin
        opa = (i < W) ? a[i] : 1'b0;
        opx = (i < W) ? x[i] : 1'b0;
        opb = (i < W) ? b[i] : 1'b0;
        @(posedge clk); #1;
        cycles++;
      end
      check("com", longint'(com), 1);
      check("out2", longint'(out2), res);
      if (!ctrl) check("cout", longint'(cout), longint'(co));
      check("clocks to com", longint'(cycles), longint'(W) + 1);
      @(posedge clk); #1;  // completion clock
    end
    finished = 1'b1;
  end
endmodule
