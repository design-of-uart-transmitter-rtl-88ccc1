// Baud rate generator: divides the system clock down to one tick per UART bit period.
//
// A counter runs from 0 to CLKS_PER_BIT-1 and wraps; `tick` is high for the one clock cycle
// in which the counter holds CLKS_PER_BIT-1, so a tick marks the last cycle of a bit period
// and the controller changes bit on the following clock edge. CLKS_PER_BIT is
// CLK_FREQ_HZ/BAUD_RATE rounded to the nearest integer (5208 at the defaults, 0.006 % fast).
//
// `clear` holds the counter at zero. The controller asserts it while idle so that the first
// bit of a frame lasts a whole bit period, however long the line has been idle; between
// back-to-back frames it is not asserted and the bit grid runs on without a gap.
//
// Baud rate 9600 is one of the two rates usually quoted for this transmitter (the other is
// 115200); the 50 MHz clock is this design's own assumption.
module baud_gen
  import uart_tx_pkg::clks_per_bit;
#(
  parameter int unsigned CLK_FREQ_HZ = 50_000_000,
  parameter int unsigned BAUD_RATE   = 9600
) (
  input  logic clk,
  input  logic reset,  // synchronous, active high
  input  logic clear,  // hold the divider at zero
  output logic tick    // last clock cycle of a bit period
);

  localparam int unsigned CLKS_PER_BIT = clks_per_bit(CLK_FREQ_HZ, BAUD_RATE);
  localparam int unsigned CW = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;

  initial assert (CLKS_PER_BIT >= 2)
    else $fatal(1, "baud_gen: clock must be at least twice the baud rate");

  logic [CW-1:0] cnt;

  assign tick = !clear && (cnt == CW'(CLKS_PER_BIT - 1));

  always_ff @(posedge clk) begin
    if (reset || clear) cnt <= '0;
    else if (tick)      cnt <= '0;
    else                cnt <= cnt + 1'b1;
  end

endmodule
