// tb_clock_gate: checks the clock-gating cell.
// The enable is changed at random, both while the clock is low and in the
// middle of a high phase. A gated rising edge must appear exactly when the
// enable was high at the end of the preceding low phase, gclk must never be
// high while clk is low, and an enable drop during a high phase must not cut
// the pulse short.
module tb_clock_gate;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;
  int exp_edges = 0, got_edges = 0;
  logic en_at_low;

  clock_gate dut (.clk, .en, .gclk);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge gclk) got_edges++;

  initial begin
    @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      #1 en = 1'($urandom);
      #3 en_at_low = en;                 // value the latch holds at the rising edge
      @(posedge clk);
      #1;
      checks++;
      if (gclk != en_at_low) begin failures++; $display("gclk=%b expected %b at %0d", gclk, en_at_low, i); end
      if (en_at_low) exp_edges++;
      // change the enable in the high phase: the pulse must not change
      en = 1'($urandom);
      #2;
      checks++;
      if (gclk != en_at_low) begin failures++; $display("pulse altered by high-phase enable change at %0d", i); end
      @(negedge clk);
      checks++;
      if (gclk) begin failures++; $display("gclk high while clk low at %0d", i); end
    end
    checks++;
    if (got_edges != exp_edges) begin failures++; $display("edges %0d expected %0d", got_edges, exp_edges); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
