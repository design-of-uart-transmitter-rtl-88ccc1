// Self-checking testbench for stop_bit_gen.
//
// Two generators are checked: the default with one stop bit and one with STOP_BITS = 2.
// Each is enabled, fed ticks spaced at random, and must report `bit_done` on exactly the
// first (respectively second) tick of the enabled window, keep its line level high, and
// start over when enabled again after a window cut short.
module stop_bit_gen_tb;

  logic clk = 1'b0;
  logic reset, en, tick;
  logic tx1, done1, tx2, done2;
  int checks = 0, failures = 0, n1 = 0, n2 = 0;

  always #5 clk = ~clk;

  stop_bit_gen                 dut1 (.clk, .reset, .en, .tick, .tx_bit(tx1), .bit_done(done1));
  stop_bit_gen #(.STOP_BITS(2)) dut2 (.clk, .reset, .en, .tick, .tx_bit(tx2), .bit_done(done2));

  int unsigned m_ticks;  // ticks in the current window

  initial begin
    reset = 1'b1; en = 1'b0; tick = 1'b0; m_ticks = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      if ($urandom_range(0, 15) == 0) en = !en;
      tick = ($urandom_range(0, 3) == 0);
      #1;
      checks += 4;
      if (tx1 !== 1'b1 || tx2 !== 1'b1) begin
        failures++;
        $display("FAIL cycle %0d: stop level low", i);
      end
      if (done1 !== (en && tick && (m_ticks % 1 == 0))) begin
        failures++;
        $display("FAIL cycle %0d: done1=%0b", i, done1);
      end
      if (done2 !== (en && tick && (m_ticks % 2 == 1))) begin
        failures++;
        $display("FAIL cycle %0d: done2=%0b (ticks so far %0d)", i, done2, m_ticks);
      end
      if (tx1 !== tx2) failures++;
      if (done1) n1++;
      if (done2) n2++;
      @(negedge clk);
      if (!en)       m_ticks = 0;
      else if (tick) m_ticks++;
    end
    checks++;
    if (n1 < 10 || n2 < 10) begin
      failures++;
      $display("FAIL: coverage n1=%0d n2=%0d", n1, n2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
