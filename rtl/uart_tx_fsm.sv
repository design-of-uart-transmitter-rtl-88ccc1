// Transmit controller: the finite state machine that sequences a UART frame.
//
//   IDLE  --hold_full-->  START  --start_done-->  DATA  --data_done-->  STOP
//   STOP  --stop_done, hold register full-->  START   (next frame follows at once)
//   STOP  --stop_done, hold register empty--> IDLE
//
// In IDLE the line is high and the baud divider is held at zero (`baud_clear`). When a byte
// waits in the transmit hold register the controller pulses `load`, which moves the byte
// into the shift register and empties the hold register, and enters START. The start, data
// and stop generators each report the end of their part of the frame; the controller only
// steps from one to the next. In the last cycle of the stop bit it pulses `frame_done`. If
// another byte was written during the frame it is loaded in that same cycle and the next
// start bit follows with no idle time.
//
// The four states and their order are those of the frame itself. The direct STOP -> START
// step for back-to-back bytes, the Moore outputs and the synchronous reset are this
// design's choices. Outputs `load` and `frame_done` are combinational (Mealy) pulses; all
// others decode the state register.
module uart_tx_fsm
  import uart_tx_pkg::tx_state_e, uart_tx_pkg::IDLE, uart_tx_pkg::START, uart_tx_pkg::DATA, uart_tx_pkg::STOP;
(
  input  logic      clk,
  input  logic      reset,       // synchronous, active high
  input  logic      hold_full,   // a byte waits in the hold register
  input  logic      start_done,  // start bit ends at this edge
  input  logic      data_done,   // last data bit ends at this edge
  input  logic      stop_done,   // last stop bit ends at this edge
  output tx_state_e state,
  output logic      load,        // hold register -> shift register
  output logic      baud_clear,
  output logic      start_en,
  output logic      data_en,
  output logic      stop_en,
  output logic      frame_done
);

  tx_state_e next;

  always_comb begin
    next       = state;
    load       = 1'b0;
    frame_done = 1'b0;
    unique case (state)
      IDLE: if (hold_full) begin
        load = 1'b1;
        next = START;
      end
      START: if (start_done) next = DATA;
      DATA:  if (data_done)  next = STOP;
      STOP: if (stop_done) begin
        frame_done = 1'b1;
        if (hold_full) begin
          load = 1'b1;
          next = START;
        end else begin
          next = IDLE;
        end
      end
      default: next = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) state <= IDLE;
    else       state <= next;
  end

  assign baud_clear = (state == IDLE);
  assign start_en   = (state == START);
  assign data_en    = (state == DATA);
  assign stop_en    = (state == STOP);

  // A frame's parts end only in the state that owns them.
  assert property (@(posedge clk) disable iff (reset) start_done |-> state == START);
  assert property (@(posedge clk) disable iff (reset) data_done  |-> state == DATA);
  assert property (@(posedge clk) disable iff (reset) stop_done  |-> state == STOP);

endmodule
