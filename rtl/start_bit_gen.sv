// Start bit generator: produces the start bit of a frame.
//
// While the controller holds `en` (the START state), `tx_bit` is low, the start bit level;
// otherwise it rests at the idle (high) level so it can be combined with the other bit
// sources. `bit_done` reports the baud tick that ends the start bit, which sends the
// controller on to the data bits. Purely combinational: the bit's length comes from the
// baud rate generator.
module start_bit_gen
  import uart_tx_pkg::SPACE, uart_tx_pkg::MARK;
(
  input  logic en,        // START state
  input  logic tick,      // end of a bit period
  output logic tx_bit,    // low during the start bit
  output logic bit_done   // start bit ends at this clock edge
);

  assign tx_bit   = en ? SPACE : MARK;
  assign bit_done = en && tick;

endmodule
