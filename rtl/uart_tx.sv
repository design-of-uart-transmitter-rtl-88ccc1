// UART transmitter: sends a parallel byte as an asynchronous serial frame.
//
// A frame is one start bit (low), DATA_BITS data bits, least significant first, and
// STOP_BITS stop bits (high); between frames the line stays high. Each bit lasts
// CLK_FREQ_HZ/BAUD_RATE clock cycles (rounded), 5208 cycles for 9600 baud from a 50 MHz
// clock.
//
// Datapath and control:
//   start/data_in -> transmit hold register -> transmit shift register -> line mux -> tx
//   baud rate generator -> tick -> start bit generator, bit counter, stop bit generator
//   finite state machine (IDLE, START, DATA, STOP) -> enables for all of them
// The line multiplexer takes the start bit generator's output in START, the shift
// register's bit 0 in DATA, the stop bit generator's output in STOP, and the idle level
// otherwise. `tx` and `done` come straight from flip-flops, so the line has no glitches.
//
// Interface and timing (synchronous active-high reset; every signal is sampled on the
// rising clock edge):
//   * `start` with `data_in` is accepted at any rising edge at which `ready` is high (the
//     hold register is empty); a request while `ready` is low is ignored.
//   * From an idle transmitter, `tx` falls at the second rising edge after the accepting
//     edge: the first moves the byte from the hold register into the shift register and
//     enters START, the second clocks the start bit into the output flop.
//   * `done` is high for one cycle, the last clock cycle of the stop bit on `tx`.
//   * `ready` rises again one cycle after acceptance once the byte has moved into the
//     shift register, so the next byte can be written during the frame; it is then sent
//     directly after the stop bit, without idle time on the line.
//   * A frame lasts (1 + DATA_BITS + STOP_BITS) * CLKS_PER_BIT cycles, 52080 at the
//     defaults.
//
// The frame format, the four-state controller, the shift register, bit counter, baud rate
// generator and start/stop bit generators follow the transmitter's specification; the
// transmit hold register and `ready` follow its block diagram and are given their exact
// behaviour here, as are the clock frequency, the reset and the timing of `done`.
module uart_tx
  import uart_tx_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = 50_000_000,
  parameter int unsigned BAUD_RATE   = 9600,
  parameter int unsigned DATA_BITS   = 8,
  parameter int unsigned STOP_BITS   = 1
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 start,
  input  logic [DATA_BITS-1:0] data_in,
  output logic                 tx,
  output logic                 done,
  output logic                 ready
);

  logic                 tick;
  logic                 hold_full;
  logic [DATA_BITS-1:0] hold_data;
  logic                 data_bit;
  logic [$clog2(DATA_BITS)-1:0] bit_idx;
  logic                 start_bit, stop_bit;
  logic                 start_done, data_done, stop_done;
  tx_state_e            state;
  logic                 load, baud_clear, start_en, data_en, stop_en, frame_done;
  logic                 line;

  baud_gen #(
    .CLK_FREQ_HZ(CLK_FREQ_HZ),
    .BAUD_RATE  (BAUD_RATE)
  ) u_baud (
    .clk  (clk),
    .reset(reset),
    .clear(baud_clear),
    .tick (tick)
  );

  tx_hold_reg #(.DATA_BITS(DATA_BITS)) u_hold (
    .clk    (clk),
    .reset  (reset),
    .wr     (start),
    .wr_data(data_in),
    .rd     (load),
    .rd_data(hold_data),
    .full   (hold_full)
  );

  tx_shift_reg #(.DATA_BITS(DATA_BITS)) u_shift (
    .clk       (clk),
    .reset     (reset),
    .load      (load),
    .load_data (hold_data),
    .shift     (data_en && tick),
    .serial_out(data_bit)
  );

  bit_counter #(.DATA_BITS(DATA_BITS)) u_cnt (
    .clk     (clk),
    .reset   (reset),
    .en      (data_en),
    .tick    (tick),
    .count   (bit_idx),
    .all_sent(data_done)
  );

  start_bit_gen u_start (
    .en      (start_en),
    .tick    (tick),
    .tx_bit  (start_bit),
    .bit_done(start_done)
  );

  stop_bit_gen #(.STOP_BITS(STOP_BITS)) u_stop (
    .clk     (clk),
    .reset   (reset),
    .en      (stop_en),
    .tick    (tick),
    .tx_bit  (stop_bit),
    .bit_done(stop_done)
  );

  uart_tx_fsm u_fsm (
    .clk       (clk),
    .reset     (reset),
    .hold_full (hold_full),
    .start_done(start_done),
    .data_done (data_done),
    .stop_done (stop_done),
    .state     (state),
    .load      (load),
    .baud_clear(baud_clear),
    .start_en  (start_en),
    .data_en   (data_en),
    .stop_en   (stop_en),
    .frame_done(frame_done)
  );

  always_comb begin
    unique case (state)
      START:   line = start_bit;
      DATA:    line = data_bit;
      STOP:    line = stop_bit;
      default: line = MARK;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      tx   <= MARK;
      done <= 1'b0;
    end else begin
      tx   <= line;
      done <= frame_done;
    end
  end

  assign ready = !hold_full;

  // The bit counter's index is only used by assertions: it must match the data bits shifted.
  assert property (@(posedge clk) disable iff (reset) data_done |-> bit_idx == $bits(bit_idx)'(DATA_BITS - 1));

endmodule
