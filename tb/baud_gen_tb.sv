// Self-checking testbench for baud_gen.
//
// Two dividers are run side by side: a small one (1050 Hz clock, 100 baud, so 10.5 rounds
// to 11 cycles per bit) and one at the default 50 MHz / 9600 baud (5208 cycles per bit).
// A reference model counts cycles since `clear` was released and predicts every tick;
// the testbench compares each clock cycle, releases and re-asserts `clear` at irregular
// points, and checks the measured tick period against the expected number of cycles.
module baud_gen_tb;

  localparam int unsigned N_SMALL = 11;    // round(1050 / 100)
  localparam int unsigned N_FULL  = 5208;  // round(50e6 / 9600)

  logic clk = 1'b0;
  logic reset;
  logic clear;
  logic tick_s, tick_f;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  baud_gen #(.CLK_FREQ_HZ(1050), .BAUD_RATE(100)) dut_s (
    .clk(clk), .reset(reset), .clear(clear), .tick(tick_s));
  baud_gen dut_f (.clk(clk), .reset(reset), .clear(clear), .tick(tick_f));

  // Reference: cycles since clear was last low, counted before the edge.
  int unsigned run_len;
  int unsigned ticks_s, ticks_f;
  int unsigned last_f;

  always @(negedge clk) begin
    if (!reset) begin
      automatic logic exp_s = !clear && ((run_len % N_SMALL) == N_SMALL - 1);
      automatic logic exp_f = !clear && ((run_len % N_FULL) == N_FULL - 1);
      checks++;
      if (tick_s !== exp_s) begin
        failures++;
        $display("FAIL small: run_len=%0d tick=%0b expected %0b", run_len, tick_s, exp_s);
      end
      checks++;
      if (tick_f !== exp_f) begin
        failures++;
        $display("FAIL full: run_len=%0d tick=%0b expected %0b", run_len, tick_f, exp_f);
      end
      if (tick_s) ticks_s++;
      if (tick_f) ticks_f++;
    end
  end

  always @(posedge clk) begin
    if (reset || clear) run_len <= 0;
    else                run_len <= run_len + 1;
  end

  initial begin
    reset = 1'b1; clear = 1'b1; ticks_s = 0; ticks_f = 0;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    repeat (2) @(posedge clk);
    // Short runs of the small divider, with clear pulses between them.
    for (int i = 0; i < 20; i++) begin
      clear <= 1'b0;
      repeat (5 + $urandom_range(0, 40)) @(posedge clk);
      clear <= 1'b1;
      repeat (1 + $urandom_range(0, 3)) @(posedge clk);
    end
    // One long run: the full-size divider must tick exactly three times in 3*5208 cycles.
    ticks_f = 0;
    clear <= 1'b0;
    repeat (3 * N_FULL) @(posedge clk);
    clear <= 1'b1;
    @(posedge clk);
    checks++;
    if (ticks_f != 3) begin
      failures++;
      $display("FAIL: %0d full-size ticks in %0d cycles, expected 3", ticks_f, 3 * N_FULL);
    end
    checks++;
    if (ticks_s < 20) begin
      failures++;
      $display("FAIL: small divider ticked only %0d times", ticks_s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
