// Self-checking testbench for bit_counter.
//
// The counter is enabled for random windows and fed ticks at random. A reference model
// counts the ticks seen inside the current window; the testbench checks `count` every
// cycle, that `all_sent` fires exactly on the 8th, 16th, ... tick of a window and
// nowhere else, and that a window opened after a partial one starts again from zero.
module bit_counter_tb;

  localparam int unsigned W = 8;

  logic       clk = 1'b0;
  logic       reset, en, tick;
  logic [2:0] count;
  logic       all_sent;
  int checks = 0, failures = 0, frames = 0;

  always #5 clk = ~clk;

  bit_counter #(.DATA_BITS(W)) dut (.*);

  int unsigned m_cnt;  // ticks seen in the current enable window

  initial begin
    reset = 1'b1; en = 1'b0; tick = 1'b0; m_cnt = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      if ($urandom_range(0, 60) == 0) en = !en;
      tick = ($urandom_range(0, 2) == 0);
      #1;
      checks++;
      if (count !== 3'(m_cnt % W)) begin
        failures++;
        $display("FAIL cycle %0d: count=%0d expected %0d", i, count, m_cnt % W);
      end
      checks++;
      if (all_sent !== (en && tick && (m_cnt % W == W - 1))) begin
        failures++;
        $display("FAIL cycle %0d: all_sent=%0b", i, all_sent);
      end
      if (all_sent) frames++;
      @(negedge clk);
      if (!en)       m_cnt = 0;
      else if (tick) m_cnt++;
    end
    checks++;
    if (frames < 5) begin
      failures++;
      $display("FAIL: only %0d complete counts", frames);
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
