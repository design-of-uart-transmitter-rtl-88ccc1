// Self-checking testbench for start_bit_gen.
//
// All four combinations of `en` and `tick` are applied several times. The line level must
// be low exactly while enabled and high otherwise, and `bit_done` must be high only when
// enabled and a tick arrives.
module start_bit_gen_tb;

  logic en, tick, tx_bit, bit_done;
  int checks = 0, failures = 0;

  start_bit_gen dut (.*);

  initial begin
    for (int r = 0; r < 4; r++) begin
      for (int v = 0; v < 4; v++) begin
        {en, tick} = 2'(v);
        #10;
        checks++;
        if (tx_bit !== !en) begin
          failures++;
          $display("FAIL en=%0b tick=%0b: tx_bit=%0b", en, tick, tx_bit);
        end
        checks++;
        if (bit_done !== (en && tick)) begin
          failures++;
          $display("FAIL en=%0b tick=%0b: bit_done=%0b", en, tick, bit_done);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
