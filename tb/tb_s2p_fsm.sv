// tb_s2p_fsm: self-checking test of the serial-to-parallel state machine.
// A reference count of advancing edges, kept in the testbench, predicts the
// first/shift/finish/done outputs each clock. Words are fed least significant
// bit first: once with the bit pattern 1, 1, 0, 1 (the design's example
// transfer), then as random words, with the advance input a held high (the
// machine must complete every WIDTH + 2 clocks, com/done one clock after the
// last bit) and with random pauses (a = 0). It also checks that S0 waits while
// a = 0, that the completion state always returns to S0 (also with a = 0) and
// that r restarts the machine from the middle of a word without disturbing
// the word.
module tb_s2p_fsm;
  localparam int W = 4;
  logic clk = 1'b0;
  logic r, a, z;
  logic [W-1:0] word;
  logic first, shift, finish, done;
  logic [W-1:0] kept;
  int checks = 0, failures = 0;
  int n_pause = 0, n_restart = 0, n_b2b = 0;

  s2p_fsm #(.WIDTH(W)) dut (.clk(clk), .r(r), .a(a), .z(z), .word(word), .first(first),
                            .shift(shift), .finish(finish), .done(done));

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %b expected %b", $time, what, got, exp);
    end
  endtask

  // Feeds one word starting in S0; returns after the completion state.
  task automatic run_word(logic [W-1:0] bits, bit pauses);
    int n = 0;
    int cycles = 0;
    while (n < W + 1) begin
      a = pauses ? 1'($urandom_range(0, 2) != 0) : 1'b1;
      z = (n < W) ? bits[n] : 1'($urandom);
      if (!a) n_pause++;
      #1;
      check("first",  first,  n == 0);
      check("shift",  shift,  a && n < W);
      check("finish", finish, a && n == W);
      check("done",   done,   1'b0);
      @(posedge clk); #1;
      cycles++;
      if (a) n++;
    end
    check("done in completion state", done, 1'b1);
    checks++;
    if (word !== bits) begin
      failures++;
      $display("FAIL word %b expected %b", word, bits);
    end
    if (!pauses) begin
      checks++;
      if (cycles != W + 1) begin
        failures++;
        $display("FAIL completion after %0d clocks, expected %0d", cycles, W + 1);
      end
    end
    // The completion state lasts one clock whatever a is.
    a = 1'($urandom);
    @(posedge clk); #1;
    check("back in S0", first, 1'b1);
    check("done cleared", done, 1'b0);
  endtask

  initial begin
    r = 1'b1; a = 1'b0; z = 1'b0;
    @(posedge clk); #1;
    r = 1'b0;
    check("first after restart", first, 1'b1);
    // S0 waits while a = 0.
    repeat (3) begin
      @(posedge clk); #1;
      check("S0 waits", first, 1'b1);
    end
    // Example transfer: bits 1, 1, 0, 1 (first to last) give 1011.
    run_word(4'b1011, 1'b0);
    // Back-to-back words with a held high: WIDTH + 2 clocks each.
    for (int i = 0; i < 20; i++) begin
      run_word(W'($urandom), 1'b0);
      n_b2b++;
    end
    for (int i = 0; i < 50; i++) run_word(W'($urandom), 1'b1);
    // Restart from the middle of a word.
    for (int i = 0; i < 10; i++) begin
      a = 1'b1; z = 1'b1;
      repeat (1 + $urandom_range(0, W - 1)) @(posedge clk);
      #1;
      check("mid-word", first, 1'b0);
      kept = word;
      r = 1'b1;
      @(posedge clk); #1;
      r = 1'b0;
      check("restart to S0", first, 1'b1);
      checks++;
      if (word !== kept) begin failures++; $display("FAIL word changed by r"); end
      n_restart++;
      run_word(W'($urandom), 1'b0);
    end
    checks++;
    if (n_pause == 0 || n_restart == 0 || n_b2b == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("pauses=%0d restarts=%0d back_to_back=%0d", n_pause, n_restart, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
