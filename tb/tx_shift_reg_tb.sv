// Self-checking testbench for tx_shift_reg.
//
// For 300 random bytes: load the byte, then shift it out with gaps of random length
// between shifts (as the baud tick would space them). Before each shift `serial_out` must
// equal the next bit of the byte, least significant bit first, and between shifts it must
// hold still. After all 8 bits the register must present ones (the idle fill). A load
// that coincides with a shift must win.
module tx_shift_reg_tb;

  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         reset, load, shift;
  logic [W-1:0] load_data;
  logic         serial_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tx_shift_reg #(.DATA_BITS(W)) dut (.*);

  task automatic expect_bit(logic exp, string what);
    checks++;
    if (serial_out !== exp) begin
      failures++;
      $display("FAIL %s: serial_out=%0b expected %0b", what, serial_out, exp);
    end
  endtask

  initial begin
    logic [W-1:0] b;
    reset = 1'b1; load = 1'b0; shift = 1'b0; load_data = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    expect_bit(1'b1, "after reset");
    for (int n = 0; n < 300; n++) begin
      b = W'($urandom);
      load = 1'b1; load_data = b;
      shift = (n % 5 == 0);  // load must win over a simultaneous shift
      @(negedge clk);
      load = 1'b0; shift = 1'b0;
      for (int i = 0; i < W; i++) begin
        repeat ($urandom_range(0, 3)) begin
          @(negedge clk);
          expect_bit(b[i], "holding");
        end
        expect_bit(b[i], "bit");
        shift = 1'b1;
        @(negedge clk);
        shift = 1'b0;
      end
      expect_bit(1'b1, "fill after last bit");
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
