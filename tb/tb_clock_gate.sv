// tb_clock_gate: self-checking test of the latch-based clock gate.
// The enable is changed at random times in both clock phases (never on an
// edge). The test checks
// that gclk is only ever high while clk is high, that a pulse passes exactly
// when the enable was high at the rising edge of clk, and that a change of
// enable while clk is high never shortens or starts a pulse.
module tb_clock_gate;
  int checks = 0, failures = 0;
  logic clk = 0, en = 0, gclk;
  logic en_at_rise;
  int   pulses = 0, expected = 0;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // enable toggles at odd times, in either phase
  initial begin
    forever begin
      @(clk);
      #($urandom % 4 + 1);
      en = 1'($urandom);
    end
  end

  always @(posedge clk) begin
    en_at_rise = en;
    if (en) expected++;
  end
  always @(posedge gclk) pulses++;

  // sample in the middle of each phase
  initial begin
    #2.5;
    for (int i = 0; i < 2000; i++) begin
      // middle of a phase
      checks++;
      if (!clk && gclk) begin failures++; $display("FAIL gclk high while clk low at %0t", $time); end
      if (clk && gclk !== en_at_rise) begin
        failures++;
        $display("FAIL gclk=%b but enable at rise was %b at %0t", gclk, en_at_rise, $time);
      end
      #5;
    end
    checks++;
    if (pulses != expected || pulses == 0) begin
      failures++;
      $display("FAIL %0d pulses, expected %0d", pulses, expected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
