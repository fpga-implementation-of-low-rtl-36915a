// tb_sha2_clock_gate: unit test of the latch-based clock gate.
//
// The enable is changed at random, both in the low phase of the clock (where
// it must take effect at the next rising edge) and in the high phase (where
// it must not change the running pulse). The test counts gated-clock edges
// per clock cycle, checks that gclk is never high while clk is low, that it
// rises with clk exactly when the enable was high before the edge, and that
// test_en forces the clock on.
module tb_sha2_clock_gate;

  logic clk = 1'b0;
  logic en = 1'b0;
  logic test_en = 1'b0;
  logic gclk;

  sha2_clock_gate dut (.clk, .en, .test_en, .gclk);

  int checks = 0, failures = 0;
  int rises;
  int n_on = 0, n_off = 0;

  always @(posedge gclk) rises++;

  initial begin
    bit en_at_edge;
    for (int c = 0; c < 400; c++) begin
      // low phase: pick the enable for the coming edge
      #2 en = 1'($urandom);
      test_en = (c >= 350) ? 1'($urandom) : 1'b0;
      #2;
      en_at_edge = en || test_en;
      rises = 0;
      #1 clk = 1'b1;            // rising edge
      #1;
      // high phase: toggle the enable, the pulse must not change
      en = ~en;
      #1;
      checks++;
      if (gclk != en_at_edge) begin
        failures++;
        $display("FAIL cycle %0d: gclk %b during high phase, enable was %b", c, gclk, en_at_edge);
      end
      #2 clk = 1'b0;            // falling edge
      #1;
      checks++;
      if (gclk != 1'b0 || rises != int'(en_at_edge)) begin
        failures++;
        $display("FAIL cycle %0d: gclk %b after fall, %0d rises, enable %b", c, gclk, rises, en_at_edge);
      end
      if (en_at_edge) n_on++; else n_off++;
    end
    checks++;
    if (n_on == 0 || n_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

endmodule
