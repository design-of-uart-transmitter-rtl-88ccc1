// Bit counter: counts the data bits of a frame and tells the controller when all are sent.
//
// While `en` (the DATA state) is high the counter holds the index of the data bit on the
// line and advances on every baud tick. On the tick that ends bit DATA_BITS-1 it pulses
// `all_sent` (combinationally, in that same cycle) and returns to zero; the controller then
// moves to the stop bit. Outside the DATA state the counter is held at zero, so every frame
// starts counting from the first bit. With 8 data bits the counter is 3 bits wide.
module bit_counter #(
  parameter int unsigned DATA_BITS = 8
) (
  input  logic                         clk,
  input  logic                         reset,     // synchronous, active high
  input  logic                         en,        // DATA state
  input  logic                         tick,      // end of a bit period
  output logic [$clog2(DATA_BITS)-1:0] count,     // index of the bit on the line
  output logic                         all_sent   // last data bit period ends now
);

  localparam int unsigned CW = $clog2(DATA_BITS);

  initial assert (DATA_BITS >= 2) else $fatal(1, "bit_counter: DATA_BITS must be at least 2");

  logic last;
  assign last     = (count == CW'(DATA_BITS - 1));
  assign all_sent = en && tick && last;

  always_ff @(posedge clk) begin
    if (reset || !en)  count <= '0;
    else if (all_sent) count <= '0;
    else if (tick)     count <= count + 1'b1;
  end

endmodule
