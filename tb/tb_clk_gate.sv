// tb_clk_gate: test of the latch-based clock gate.
//
// Changes the enable at random times, both while the clock is low and while
// it is high. Checks that a gated clock pulse appears exactly in the cycles
// whose enable was 1 at the rising edge, that the gated clock is low while
// the clock is low, and that it never changes while the clock is high
// (no glitches from enable changes in the high phase).
module tb_clk_gate;
  localparam int unsigned N = 1000;

  logic        clk = 1'b0;
  logic        en  = 1'b0;
  logic        gclk;
  int unsigned checks = 0, failures = 0, pulses = 0, expected = 0;
  int unsigned glitches = 0;

  clk_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;

  always @(posedge gclk) pulses++;

  // gclk may only move together with clk.
  always @(gclk) if ($time > 0 && $time % 5 != 0) glitches++;

  initial begin
    @(negedge clk);
    for (int unsigned n = 0; n < N; n++) begin
      // Here the clock has just fallen.
      #1 en = 1'($urandom);
      @(posedge clk);
      if (en) expected++;
      #1;
      checks++;
      if (gclk != en) begin failures++; if (failures < 10) $display("FAIL gclk=%b en=%b at %0t", gclk, en, $time); end
      // Toggle the enable in the high phase: must not reach gclk.
      #2 en = !en;
      #1;
      checks++;
      if (gclk != !en) begin failures++; if (failures < 10) $display("FAIL high-phase change reached gclk at %0t", $time); end
      @(negedge clk);
      #1;
      checks++;
      if (gclk != 1'b0) failures++;
    end
    checks += 2;
    if (pulses != expected) begin failures++; $display("FAIL pulses=%0d expected=%0d", pulses, expected); end
    if (glitches != 0) begin failures++; $display("FAIL glitches=%0d", glitches); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * N + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
