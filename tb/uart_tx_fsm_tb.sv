// Self-checking testbench for uart_tx_fsm.
//
// The controller's inputs are driven at random, each "done" input only in the state that
// owns it, as the generators do. A reference model (a transition table kept in the
// testbench) predicts the state and every output in every cycle. The test also counts the
// transitions it has seen and fails if any of them, including STOP -> START for
// back-to-back frames and STOP -> IDLE, never happened.
module uart_tx_fsm_tb;

  import uart_tx_pkg::*;

  logic      clk = 1'b0;
  logic      reset, hold_full, start_done, data_done, stop_done;
  tx_state_e state;
  logic      load, baud_clear, start_en, data_en, stop_en, frame_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  uart_tx_fsm dut (.*);

  // model state as plain 2-bit codes: 0 idle, 1 start, 2 data, 3 stop
  logic [1:0] m;
  int unsigned seen [4][4];  // seen[from][to]

  task automatic chk(logic got, logic exp, string name, int cyc);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d: %s=%0b expected %0b (model state %0d)", cyc, name, got, exp, m);
    end
  endtask

  initial begin
    logic [1:0] nx;
    logic e_load, e_done;
    reset = 1'b1; hold_full = 1'b0; start_done = 1'b0; data_done = 1'b0; stop_done = 1'b0;
    m = 2'd0;
    foreach (seen[i, j]) seen[i][j] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      hold_full  = ($urandom_range(0, 1) == 1);
      start_done = (m == 2'd1) && ($urandom_range(0, 2) == 0);
      data_done  = (m == 2'd2) && ($urandom_range(0, 2) == 0);
      stop_done  = (m == 2'd3) && ($urandom_range(0, 2) == 0);
      // reference transition table
      nx = m; e_load = 1'b0; e_done = 1'b0;
      case (m)
        2'd0: if (hold_full) begin nx = 2'd1; e_load = 1'b1; end
        2'd1: if (start_done) nx = 2'd2;
        2'd2: if (data_done) nx = 2'd3;
        2'd3: if (stop_done) begin
          e_done = 1'b1;
          nx = hold_full ? 2'd1 : 2'd0;
          e_load = hold_full;
        end
      endcase
      #1;
      checks++;
      if (2'(state) !== m) begin
        failures++;
        $display("FAIL cycle %0d: state=%0d expected %0d", i, state, m);
      end
      chk(load,       e_load,    "load",       i);
      chk(frame_done, e_done,    "frame_done", i);
      chk(baud_clear, m == 2'd0, "baud_clear", i);
      chk(start_en,   m == 2'd1, "start_en",   i);
      chk(data_en,    m == 2'd2, "data_en",    i);
      chk(stop_en,    m == 2'd3, "stop_en",    i);
      @(negedge clk);
      seen[m][nx]++;
      m = nx;
    end
    // every legal transition must have been exercised
    begin
      automatic int unsigned need [6][2] = '{'{0, 1}, '{1, 2}, '{2, 3}, '{3, 0}, '{3, 1}, '{3, 3}};
      foreach (need[k]) begin
        checks++;
        if (seen[need[k][0]][need[k][1]] == 0) begin
          failures++;
          $display("FAIL: transition %0d -> %0d never seen", need[k][0], need[k][1]);
        end
      end
      $display("transitions: idle->start %0d, stop->start %0d, stop->idle %0d",
               seen[0][1], seen[3][1], seen[3][0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
