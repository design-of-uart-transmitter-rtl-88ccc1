// End-to-end testbench of the uart_tx transmitter with two stop bits.
//
// A fast, small configuration keeps the run short: a 1 MHz clock and 100 kbaud give 10
// clock cycles per bit, and with STOP_BITS = 2 each frame is 11 bits, 110 cycles. The
// checker's line model then expects two high bit periods after the data bits, and the
// next back-to-back frame only after both.
module uart_tx_stop2_tb;

  logic       clk = 1'b0;
  logic       reset, start, tx, done, ready;
  logic [7:0] data_in;

  always #500 clk = ~clk;  // 1 MHz

  uart_tx #(
    .CLK_FREQ_HZ(1_000_000),
    .BAUD_RATE  (100_000),
    .STOP_BITS  (2)
  ) dut (
    .clk    (clk),
    .reset  (reset),
    .start  (start),
    .data_in(data_in),
    .tx     (tx),
    .done   (done),
    .ready  (ready)
  );

  uart_tx_checker #(
    .CLKS_PER_BIT(10),
    .STOP_BITS   (2),
    .N_BURST     (20),
    .N_RANDOM    (50)
  ) chk (.*);

  logic finished;

  initial begin
    @(posedge finished);
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures);
    $finish;
  end

  initial begin
    repeat (int'(chk.WATCHDOG)) @(posedge clk);
    chk.failures++;
    $display("FAIL: watchdog after %0d cycles", chk.WATCHDOG);
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures);
    $finish;
  end

endmodule
