// tb_serial_alu: end-to-end self-checking test of the serial ALU at its
// default width.
//
// Each operation drives ctrl/cin/sel and the operand bits least significant
// first, one bit per advancing clock, and then checks out2 and cout in the
// clock where com is high. Expected values come from the operation table,
// written here as plain integer arithmetic: a + x, a - x - 1, a - 1, a,
// a + x + 1, a - x, a, a + 1 (modulo 2^WIDTH) and AND, OR, XOR, NOT b, with the
// carry out stated as a comparison (for example a >= x for a - x).
//
// Mechanisms exercised and counted, each of which must occur:
//   every row of the operation table; a carry out of 1; operations back to
//   back with the advance input held high (com must come WIDTH + 1 clocks
//   after the first bit and repeat every WIDTH + 2 clocks); pauses (adv = 0);
//   restarts with r in the middle of an operation; changes of the requested
//   operation while one is in progress (they must not affect it); the result
//   staying on out2 while the next operation runs.
module tb_serial_alu;
  import serial_alu_pkg::*;
  localparam int W = ALU_WIDTH;

  logic clk = 1'b0;
  logic r, adv, cin, ctrl, opa, opx, opb, cout, com, busy;
  logic [1:0]   sel;
  logic [W-1:0] out2, kept;

  int checks = 0, failures = 0;
  int n_row[16] = '{default: 0};
  int n_carry = 0, n_b2b = 0, n_pause = 0, n_restart = 0, n_opchange = 0, n_hold = 0;

  serial_alu dut (.clk(clk), .r(r), .adv(adv), .cin(cin), .sel(sel), .ctrl(ctrl),
                  .opa(opa), .opx(opx), .opb(opb), .out2(out2), .cout(cout), .com(com),
                  .busy(busy));

  always #10 clk = ~clk;  // 20 time units per clock

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W:0] expected(logic c, logic cl, logic [1:0] s,
                                          int unsigned a, int unsigned x, int unsigned b);
    int unsigned m = 1 << W;
    int unsigned res;
    logic        co;
    if (cl) begin
      co = 1'b0;
      case (s)
        2'b00:   res = a & b;
        2'b01:   res = a | b;
        2'b10:   res = a ^ b;
        default: res = ~b;
      endcase
    end else begin
      case ({c, s})
        3'b000:  begin res = a + x;         co = (a + x >= m);     end
        3'b001:  begin res = a - x - 1;     co = (a > x);          end
        3'b010:  begin res = a - 1;         co = (a != 0);         end
        3'b011:  begin res = a;             co = 1'b0;             end
        3'b100:  begin res = a + x + 1;     co = (a + x + 1 >= m); end
        3'b101:  begin res = a - x;         co = (a >= x);         end
        3'b110:  begin res = a;             co = 1'b1;             end
        default: begin res = a + 1;         co = (a == m - 1);     end
      endcase
    end
    return {co, W'(res % m)};
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // One operation, starting in the idle state. pauses: random adv = 0 clocks.
  // change: randomise the requested operation after the first bit.
  task automatic do_op(logic c, logic cl, logic [1:0] s, logic [W-1:0] a, logic [W-1:0] x,
                       logic [W-1:0] b, bit pauses, bit change);
    logic [W:0]   exp;
    logic [W-1:0] prev_out;
    int n = 0, cycles = 0;
    exp      = expected(c, cl, s, int'(a), int'(x), int'(b));
    prev_out = out2;
    cin = c; ctrl = cl; sel = s;
    while (n < W + 1) begin
      adv = pauses ? 1'($urandom_range(0, 2) != 0) : 1'b1;
      if (!adv) n_pause++;
      if (n > 0 && change) begin
        {cin, ctrl, sel} = 4'($urandom);
        if ({cin, ctrl, sel} != {c, cl, s}) n_opchange++;
      end
      opa = (n < W) ? a[n] : 1'($urandom);
      opx = (n < W) ? x[n] : 1'($urandom);
      opb = (n < W) ? b[n] : 1'($urandom);
      #1;
      check("com low while computing", int'(com), int'(0));
      if (n > 0) begin
        check("previous result held", int'(out2), int'(prev_out));
        n_hold++;
      end
      @(posedge clk); #1;
      cycles++;
      if (adv) n++;
    end
    check("com", int'(com), int'(1));
    check("out2", int'(out2), int'(exp[W-1:0]));
    if (!cl) begin
      check("cout", int'(cout), int'(exp[W]));
      if (exp[W]) n_carry++;
    end
    if (!pauses) check("clocks from first bit to com", int'(cycles), int'(W + 1));
    n_row[{cl, c, s}]++;
    // The completion clock: the next edge returns to the idle state.
    adv = 1'($urandom);
    @(posedge clk); #1;
    check("com is one clock", int'(com), int'(0));
    check("idle after completion", int'(busy), int'(0));
  endtask

  initial begin
    r = 1'b1; adv = 1'b0; cin = 1'b0; ctrl = 1'b0; sel = 2'b00;
    opa = 1'b0; opx = 1'b0; opb = 1'b0;
    @(posedge clk); #1;
    r = 1'b0;
    check("com after restart", int'(com), int'(0));

    // The demonstration sequence: arithmetic operations first, then a restart
    // and the four logic operations.
    do_op(1'b0, 1'b0, 2'b00, 4'd5, 4'd6, 4'd0, 0, 0);    // 5 + 6
    do_op(1'b1, 1'b0, 2'b01, 4'd9, 4'd3, 4'd0, 0, 0);    // 9 - 3
    do_op(1'b1, 1'b0, 2'b11, 4'd15, 4'd0, 4'd0, 0, 0);   // 15 + 1
    do_op(1'b0, 1'b0, 2'b10, 4'd0, 4'd0, 4'd0, 0, 0);    // 0 - 1
    r = 1'b1;
    @(posedge clk); #1;
    r = 1'b0;
    do_op(1'b0, 1'b1, 2'b00, 4'd12, 4'd0, 4'd10, 0, 0);  // 1100 AND 1010
    do_op(1'b0, 1'b1, 2'b01, 4'd12, 4'd0, 4'd10, 0, 0);  // OR
    do_op(1'b0, 1'b1, 2'b10, 4'd12, 4'd0, 4'd10, 0, 0);  // XOR
    do_op(1'b0, 1'b1, 2'b11, 4'd12, 4'd0, 4'd10, 0, 0);  // NOT b

    // Every arithmetic row with every operand pair, back to back.
    for (int v = 0; v < 8 * 256; v++) begin
      do_op(1'(v >> 10), 1'b0, 2'(v >> 8), W'(v), W'(v >> 4), W'($urandom), 0, 0);
      n_b2b++;
    end
    // Logic rows, every operand pair.
    for (int v = 0; v < 4 * 256; v++)
      do_op(1'($urandom), 1'b1, 2'(v >> 8), W'(v), W'($urandom), W'(v >> 4), 0, 0);
    // Random operations with pauses and with requests changing mid-operation.
    for (int n = 0; n < 400; n++)
      do_op(1'($urandom), 1'($urandom), 2'($urandom), W'($urandom), W'($urandom),
            W'($urandom), 1'($urandom), 1'($urandom));
    // Restart in the middle of an operation, then a clean operation.
    for (int n = 0; n < 20; n++) begin
      adv = 1'b1; ctrl = 1'b0; cin = 1'b1; sel = 2'b00; opa = 1'b1; opx = 1'b1;
      repeat (1 + $urandom_range(0, W - 1)) @(posedge clk);
      #1;
      check("busy mid-operation", int'(busy), int'(1));
      kept = out2;
      r = 1'b1;
      @(posedge clk); #1;
      r = 1'b0;
      check("restart keeps last result", int'(out2), int'(kept));
      check("restart ends operation", int'(busy), int'(0));
      n_restart++;
      do_op(1'($urandom), 1'($urandom), 2'($urandom), W'($urandom), W'($urandom),
            W'($urandom), 0, 0);
    end

    for (int i = 0; i < 12; i++) begin
      // rows: {ctrl, cin, sel}; for logic rows cin is don't care
      automatic int hits = (i < 8) ? n_row[i] : n_row[8 + (i - 8)] + n_row[12 + (i - 8)];
      checks++;
      if (hits == 0) begin
        failures++;
        $display("FAIL operation table row %0d never exercised", i);
      end
    end
    checks++;
    if (n_carry == 0 || n_b2b == 0 || n_pause == 0 || n_restart == 0 ||
        n_opchange == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("carry_out=%0d back_to_back=%0d pauses=%0d restarts=%0d op_changes=%0d held=%0d",
             n_carry, n_b2b, n_pause, n_restart, n_opchange, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
