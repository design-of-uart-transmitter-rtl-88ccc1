// Stimulus and scoreboard for end-to-end tests of the uart_tx transmitter.
//
// Drives `reset`, `start` and `data_in` of a transmitter and checks `tx`, `done` and
// `ready` in every clock cycle against a line model written from the UART frame format
// alone: each accepted byte becomes a frame of one low start bit, DATA_BITS data bits
// LSB first and STOP_BITS high stop bits, each exactly CLKS_PER_BIT cycles long. A frame
// begins two rising edges after the edge that accepted its byte, or straight after the
// previous frame's stop bit if that is later; `done` is high for exactly the last cycle
// of each stop bit; the line is high whenever no frame is due.
//
// The stimulus runs five phases: one byte, 0xAA, sent from idle; a burst of bytes each
// written as soon as `ready` rises, so that frames follow back to back; requests made
// while `ready` is low, which must be ignored; a reset in the middle of a frame, after
// which the line must be idle at once and the next byte sent normally; and random traffic. The checker counts how
// often each mechanism occurred and fails if one never did. It raises `finished` when the
// stimulus is over; the testbench that instantiates it then reads `checks` and `failures`,
// prints the result and ends the simulation. `WATCHDOG` is the cycle budget a testbench
// should allow before giving up.
module uart_tx_checker #(
  parameter int unsigned CLKS_PER_BIT = 5208,
  parameter int unsigned DATA_BITS    = 8,
  parameter int unsigned STOP_BITS    = 1,
  parameter int unsigned N_BURST      = 4,
  parameter int unsigned N_RANDOM     = 4
) (
  input  logic                 clk,
  output logic                 reset,
  output logic                 start,
  output logic [DATA_BITS-1:0] data_in,
  input  logic                 tx,
  input  logic                 done,
  input  logic                 ready,
  output bit                   finished
);

  localparam int unsigned FRAME_BITS = 1 + DATA_BITS + STOP_BITS;
  localparam longint     FRAME      = longint'(FRAME_BITS * CLKS_PER_BIT);
  localparam longint     WATCHDOG   = FRAME * (longint'(N_BURST) + longint'(N_RANDOM) + 8) * 3 + 10000;

  typedef struct {
    logic [DATA_BITS-1:0] data;
    longint               acc;  // rising edge that accepted it
  } req_t;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_frames = 0, n_from_idle = 0, n_back_to_back = 0, n_dropped = 0, n_done = 0;
  int n_aa = 0, n_reset_mid_frame = 0, n_aborted = 0;

  longint cyc = 0;  // rising edges since time 0
  always @(posedge clk) cyc <= cyc + 1;

  req_t   q[$];
  logic   active = 1'b0;
  longint f_start = 0, last_end = -1;
  logic [DATA_BITS-1:0] cur;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL (edge %0d): %s", cyc, msg);
  endtask

  function automatic logic frame_bit(longint k);
    automatic longint b = k / longint'(CLKS_PER_BIT);
    if (b == 0) return 1'b0;
    if (b <= longint'(DATA_BITS)) return cur[int'(b) - 1];
    return 1'b1;
  endfunction

  // Line model and comparison, in the middle of each clock cycle.
  always @(negedge clk) begin
    if (reset) begin
      if (active) n_aborted++;
      active = 1'b0;
      q.delete();
      last_end = -1;
    end
    if (!reset && !finished) begin
      automatic logic exp_done = 1'b0;
      logic exp_tx;
      if (active && cyc == f_start + FRAME) begin
        active   = 1'b0;
        last_end = cyc;
      end
      if (!active && q.size() > 0 && q[0].acc + 2 <= cyc) begin
        automatic req_t r = q.pop_front();
        cur     = r.data;
        active  = 1'b1;
        f_start = cyc;
        n_frames++;
        if (cyc == last_end) n_back_to_back++;
        else                 n_from_idle++;
        if (r.data == DATA_BITS'('hAA)) n_aa++;
      end
      exp_tx   = active ? frame_bit(cyc - f_start) : 1'b1;
      exp_done = active && (cyc == f_start + FRAME - 1);
      checks++;
      if (tx !== exp_tx)
        fail($sformatf("tx=%0b expected %0b (%s, cycle %0d of frame)", tx, exp_tx,
                       active ? "in frame" : "idle", cyc - f_start));
      checks++;
      if (done !== exp_done) fail($sformatf("done=%0b expected %0b", done, exp_done));
      if (done) n_done++;
    end
  end

  // Record what each rising edge accepts (sampled before the edge's updates take effect).
  always @(posedge clk) begin
    if (!reset && !finished) begin
      if (start && ready) q.push_back('{data_in, cyc + 1});
      else if (start)     n_dropped++;
    end
  end

  // Right after an accepting edge the hold register is full, so ready must be low.
  logic accepted_last = 1'b0;
  always @(posedge clk) accepted_last <= !reset && start && ready;
  always @(negedge clk) begin
    if (!reset && !finished && accepted_last) begin
      checks++;
      if (ready !== 1'b0) fail("ready high right after a byte was accepted");
    end
  end

  task automatic send(logic [DATA_BITS-1:0] d);
    // wait for ready, then present the request for one edge (inputs change at negedge)
    while (ready !== 1'b1) @(negedge clk);
    start   = 1'b1;
    data_in = d;
    @(negedge clk);
    start   = 1'b0;
  endtask

  task automatic wait_idle();
    while (active || q.size() > 0) @(negedge clk);
    repeat (5) @(negedge clk);
  endtask

  task automatic expect_pos(int n, string what);
    checks++;
    if (n <= 0) begin
      failures++;
      $display("FAIL: mechanism never happened: %s", what);
    end
  endtask

  initial begin
    finished = 1'b0;
    reset = 1'b1; start = 1'b0; data_in = '0;
    repeat (4) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    checks++;
    if (tx !== 1'b1 || done !== 1'b0 || ready !== 1'b1) fail("outputs after reset");

    // 1: one byte from idle
    send(DATA_BITS'('hAA));
    wait_idle();

    // 2: back-to-back burst, each byte written as soon as the hold register is free
    for (int i = 0; i < N_BURST; i++) send(DATA_BITS'($urandom));
    wait_idle();

    // 3: requests while the hold register is full must be ignored
    send(DATA_BITS'('h5A));
    send(DATA_BITS'('hC3));       // waits in the hold register
    repeat (3) begin              // these are dropped
      start   = 1'b1;
      data_in = DATA_BITS'('hFF);
      @(negedge clk);
      start   = 1'b0;
      @(negedge clk);
    end
    wait_idle();

    // 4: reset in the middle of a frame, with another byte waiting: the line must go
    //    idle at once, both bytes are discarded and the transmitter works afterwards
    send(DATA_BITS'('h0F));
    send(DATA_BITS'('hF0));
    repeat ($urandom_range(FRAME_BITS * CLKS_PER_BIT / 4, FRAME_BITS * CLKS_PER_BIT / 2))
      @(negedge clk);
    checks++;
    if (!active) fail("no frame running before the mid-frame reset");
    reset = 1'b1;
    @(negedge clk);
    checks++;
    if (tx !== 1'b1 || done !== 1'b0 || ready !== 1'b1) fail("outputs after mid-frame reset");
    else n_reset_mid_frame++;
    @(negedge clk);
    reset = 1'b0;
    send(DATA_BITS'('h81));
    wait_idle();

    // 5: random traffic with random gaps
    for (int i = 0; i < N_RANDOM; i++) begin
      repeat ($urandom_range(0, int'(FRAME * 2))) @(negedge clk);
      send(DATA_BITS'($urandom));
    end
    wait_idle();

    expect_pos(n_aa, "frame carrying 0xAA");
    expect_pos(n_from_idle, "frame started from idle");
    expect_pos(n_back_to_back, "back-to-back frame");
    expect_pos(n_dropped, "request ignored while hold register full");
    expect_pos(n_reset_mid_frame, "reset in the middle of a frame");
    checks++;
    if (n_done != n_frames - n_aborted) begin
      failures++;
      $display("FAIL: %0d done pulses for %0d completed frames", n_done, n_frames - n_aborted);
    end
    $display("frames %0d (from idle %0d, back to back %0d), requests ignored %0d, mid-frame resets %0d, %0d cycles per bit",
             n_frames, n_from_idle, n_back_to_back, n_dropped, n_reset_mid_frame, CLKS_PER_BIT);
    finished = 1'b1;
  end

endmodule
