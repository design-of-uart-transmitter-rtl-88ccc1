// End-to-end testbench of the uart_tx transmitter at 115200 baud from a 50 MHz clock,
// the other common rate besides the default 9600 baud.
//
// 50e6 / 115200 = 434.03, so a bit lasts 434 clock cycles (a rate 0.008 % fast). The same
// stimulus and cycle-by-cycle line checks as the default-configuration test are applied
// through uart_tx_checker.
module uart_tx_115200_tb;

  logic       clk = 1'b0;
  logic       reset, start, tx, done, ready;
  logic [7:0] data_in;

  always #10 clk = ~clk;  // 50 MHz

  uart_tx #(.BAUD_RATE(115200)) dut (
    .clk    (clk),
    .reset  (reset),
    .start  (start),
    .data_in(data_in),
    .tx     (tx),
    .done   (done),
    .ready  (ready)
  );

  uart_tx_checker #(
    .CLKS_PER_BIT(434),
    .N_BURST     (8),
    .N_RANDOM    (16)
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
