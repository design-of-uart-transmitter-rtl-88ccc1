// Stop bit generator: produces the stop bit(s) that close a frame.
//
// While the controller holds `en` (the STOP state) the line stays at the high stop level for
// STOP_BITS bit periods. A small counter counts the baud ticks; on the tick that ends the
// last stop bit, `bit_done` pulses and the controller either returns to idle or starts the
// next frame. The counter is held at zero outside the STOP state. One stop bit is the
// frame this transmitter is built for; STOP_BITS = 2 is offered as an option.
//
// `tx_bit` is the stop level. It is high at all times by the nature of a stop bit, and it
// is kept as a port so the line multiplexer takes each part of the frame from its
// generator.
module stop_bit_gen
  import uart_tx_pkg::MARK;
#(
  parameter int unsigned STOP_BITS = 1
) (
  input  logic clk,
  input  logic reset,     // synchronous, active high
  input  logic en,        // STOP state
  input  logic tick,      // end of a bit period
  output logic tx_bit,    // stop level (high)
  output logic bit_done   // last stop bit ends at this clock edge
);

  localparam int unsigned CW = (STOP_BITS > 1) ? $clog2(STOP_BITS) : 1;

  initial assert (STOP_BITS >= 1) else $fatal(1, "stop_bit_gen: STOP_BITS must be at least 1");

  logic [CW-1:0] cnt;

  assign tx_bit   = MARK;
  assign bit_done = en && tick && (cnt == CW'(STOP_BITS - 1));

  always_ff @(posedge clk) begin
    if (reset || !en || bit_done) cnt <= '0;
    else if (tick)                cnt <= cnt + 1'b1;
  end

endmodule
