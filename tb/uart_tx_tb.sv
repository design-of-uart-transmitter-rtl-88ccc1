// End-to-end testbench of the uart_tx transmitter at its default configuration:
// 50 MHz clock, 9600 baud (5208 clock cycles per bit), 8 data bits, 1 stop bit.
//
// The transmitter is instantiated with no parameter overrides. uart_tx_checker drives it
// through one byte (0xAA) from idle, a burst of back-to-back frames, requests ignored
// while the hold register is full, a reset in the middle of a frame, and random
// traffic, checking the serial line, `done` and `ready` cycle by cycle against a model
// of the frame format. The expected bit period, 5208 cycles, is written here as a
// number, worked out from 50e6 / 9600.
module uart_tx_tb;

  logic       clk = 1'b0;
  logic       reset, start, tx, done, ready;
  logic [7:0] data_in;

  always #10 clk = ~clk;  // 50 MHz

  uart_tx dut (
    .clk    (clk),
    .reset  (reset),
    .start  (start),
    .data_in(data_in),
    .tx     (tx),
    .done   (done),
    .ready  (ready)
  );

  uart_tx_checker #(
    .CLKS_PER_BIT(5208),
    .DATA_BITS   (8),
    .STOP_BITS   (1)
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
