// Transmit hold register: a one-byte buffer between the user and the shift register.
//
// A write (`wr`) is taken only while the register is empty; the byte is stored and `full`
// rises on the next clock. When the controller moves the byte into the shift register it
// pulses `rd`, which empties the register. Because the hold register is separate from the
// shift register, the next byte can be written while the current frame is still on the line,
// and the controller then starts the next frame straight after the stop bit. A write while
// full is ignored: the writer must wait for `full` to fall.
//
// The hold-register / shift-register pair and the "is the transmit buffer empty?" check
// follow the usual UART transmitter organisation; the one-byte depth, the drop-on-full rule
// and the rule that a read and a write cannot meet (a write needs an empty register, a read
// a full one) are this design's own choices.
module tx_hold_reg #(
  parameter int unsigned DATA_BITS = 8
) (
  input  logic                 clk,
  input  logic                 reset,    // synchronous, active high
  input  logic                 wr,       // write request
  input  logic [DATA_BITS-1:0] wr_data,
  input  logic                 rd,       // byte taken
  output logic [DATA_BITS-1:0] rd_data,
  output logic                 full
);

  always_ff @(posedge clk) begin
    if (reset) begin
      full    <= 1'b0;
      rd_data <= '0;
    end else if (wr && !full) begin
      full    <= 1'b1;
      rd_data <= wr_data;
    end else if (rd) begin
      full    <= 1'b0;
    end
  end

  // A read is only meaningful when a byte is stored.
  assert property (@(posedge clk) disable iff (reset) rd |-> full);

endmodule
