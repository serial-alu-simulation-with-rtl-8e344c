// tb_serial_adder: self-checking test of the bit-serial full adder.
// Random 4-bit words a and k and a random carry-in are fed one bit per clock,
// least significant first (first = 1 on bit 0). The collected sum bits must
// equal the low four bits of a + k + cin, and the stored carry after the last
// bit must equal bit 4 of that sum. A pause (step = 0) in the middle of a word
// must leave the stored carry unchanged. Every 4-bit combination is covered.
module tb_serial_adder;
  localparam int W = 4;
  logic clk = 1'b0;
  logic rst, first, step, a, k, cin, sum, carry;
  int checks = 0, failures = 0;
  int pauses = 0;

  serial_adder dut (.clk(clk), .rst(rst), .first(first), .step(step), .a(a), .k(k),
                    .cin(cin), .sum(sum), .carry(carry));

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add_word(logic [W-1:0] av, logic [W-1:0] kv, logic c, bit pause);
    logic [W:0]   exp;
    logic [W-1:0] got;
    logic         held;
    exp = {1'b0, av} + {1'b0, kv} + (W+1)'(c);
    cin = c;
    for (int i = 0; i < W; i++) begin
      if (pause && i == 2) begin
        // Hold for one clock with step low: the carry must not move.
        first = 1'b0; step = 1'b0; a = ~a; k = ~k;
        held = carry;
        @(posedge clk); #1;
        checks++;
        if (carry !== held) begin
          failures++;
          $display("FAIL carry changed while step = 0");
        end
        pauses++;
      end
      first = (i == 0);
      step  = 1'b1;
      a     = av[i];
      k     = kv[i];
      #1;
      got[i] = sum;
      @(posedge clk); #1;
    end
    step = 1'b0;
    checks++;
    if (got !== exp[W-1:0] || carry !== exp[W]) begin
      failures++;
      $display("FAIL %0d + %0d + %0d: sum %0d carry %b, expected %0d carry %b",
               av, kv, c, got, carry, exp[W-1:0], exp[W]);
    end
  endtask

  initial begin
    rst = 1'b1; first = 1'b0; step = 1'b0; a = 1'b0; k = 1'b0; cin = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    checks++;
    if (carry !== 1'b0) begin
      failures++;
      $display("FAIL carry not cleared by rst");
    end
    for (int v = 0; v < 512; v++)
      add_word(W'(v), W'(v >> W), 1'((v >> (2*W)) & 1), (v % 7) == 3);
    for (int n = 0; n < 200; n++)
      add_word(W'($urandom), W'($urandom), 1'($urandom), 1'($urandom));
    if (pauses == 0) begin
      failures++;
      $display("FAIL no pause exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
