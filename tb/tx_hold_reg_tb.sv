// Self-checking testbench for tx_hold_reg.
//
// Random writes and reads are applied for 2000 cycles (reads only while the register is
// full, as the controller does). A reference model of a one-byte buffer that takes a
// write only when empty predicts `full` and the stored byte every cycle; writes made
// while full must be dropped without touching the stored byte.
module tx_hold_reg_tb;

  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         reset;
  logic         wr, rd;
  logic [W-1:0] wr_data, rd_data;
  logic         full;
  int checks = 0, failures = 0;
  int drops = 0, accepts = 0;

  always #5 clk = ~clk;

  tx_hold_reg #(.DATA_BITS(W)) dut (.*);

  logic         m_full;
  logic [W-1:0] m_data;

  initial begin
    reset = 1'b1; wr = 1'b0; rd = 1'b0; wr_data = '0;
    m_full = 1'b0; m_data = '0;
    repeat (2) @(posedge clk);
    reset = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (full !== m_full || (m_full && rd_data !== m_data)) begin
        failures++;
        $display("FAIL cycle %0d: full=%0b data=%02h expected full=%0b data=%02h",
                 i, full, rd_data, m_full, m_data);
      end
      wr      = ($urandom_range(0, 2) == 0);
      wr_data = W'($urandom);
      rd      = m_full && ($urandom_range(0, 3) == 0);
      @(posedge clk);
      // model update, using the values applied at this edge
      if (wr && !m_full) begin
        m_full = 1'b1; m_data = wr_data; accepts++;
      end else if (rd) begin
        m_full = 1'b0;
      end else if (wr) begin
        drops++;
      end
    end
    checks++;
    if (drops == 0 || accepts == 0) begin
      failures++;
      $display("FAIL: no coverage, accepts=%0d drops=%0d", accepts, drops);
    end
    $display("accepted %0d writes, dropped %0d", accepts, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
