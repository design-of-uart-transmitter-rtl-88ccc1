// Transmit shift register: parallel-to-serial conversion of one byte.
//
// `load` copies the byte from the hold register. Each `shift` moves the contents one place
// towards bit 0 and fills the top with a 1, so `serial_out` (bit 0) presents the data bits
// least significant bit first, the order a UART sends them in. Shifting is enabled once per
// bit period (by the baud tick during the DATA state), not on every clock, so that each bit
// stays on the line for a whole bit period. `load` wins if both are asserted.
module tx_shift_reg #(
  parameter int unsigned DATA_BITS = 8
) (
  input  logic                 clk,
  input  logic                 reset,      // synchronous, active high
  input  logic                 load,
  input  logic [DATA_BITS-1:0] load_data,
  input  logic                 shift,
  output logic                 serial_out
);

  logic [DATA_BITS-1:0] sr;

  always_ff @(posedge clk) begin
    if (reset)      sr <= '1;
    else if (load)  sr <= load_data;
    else if (shift) sr <= {1'b1, sr[DATA_BITS-1:1]};
  end

  assign serial_out = sr[0];

endmodule
