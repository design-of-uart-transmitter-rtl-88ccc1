// Shared types and constants of the UART transmitter.
//
// The controller walks through four states, IDLE, START, DATA and STOP, one per part of a
// UART frame. The states are held in two flip-flops; the encoding below is this design's
// own choice (the state names are the ones the transmitter is built around). The line
// levels are the usual UART ones: the line idles high (mark), the start bit is low
// (space) and the stop bit is high.
package uart_tx_pkg;

  typedef enum logic [1:0] {
    IDLE  = 2'b00,  // line high, waiting for a byte in the hold register
    START = 2'b01,  // one bit period of start bit (low)
    DATA  = 2'b10,  // DATA_BITS bit periods, least significant bit first
    STOP  = 2'b11   // STOP_BITS bit periods of stop bit (high)
  } tx_state_e;

  localparam logic MARK  = 1'b1;  // idle and stop level
  localparam logic SPACE = 1'b0;  // start bit level

  // Clock cycles per bit period, rounded to the nearest integer.
  function automatic int unsigned clks_per_bit(int unsigned clk_freq_hz, int unsigned baud_rate);
    return (clk_freq_hz + baud_rate / 2) / baud_rate;
  endfunction

endpackage
