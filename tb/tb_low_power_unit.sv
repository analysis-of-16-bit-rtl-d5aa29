// tb_low_power_unit: self-checking test of the core's clock gating.
// Counts pulses of the core and multiplier clocks while the halt and
// multiplier-activity inputs change on falling edges: the core clock must pass
// every pulse until halted and none after; the multiplier clock only those
// cycles in which the multiplier is active and the core not halted.
module tb_low_power_unit;
  int checks = 0, failures = 0;
  logic clk = 0, halted = 0, mul_active = 0;
  logic core_clk, mul_clk;
  int   core_pulses = 0, mul_pulses = 0, want_core = 0, want_mul = 0;

  low_power_unit dut (.clk(clk), .halted(halted), .mul_active(mul_active),
                      .core_clk(core_clk), .mul_clk(mul_clk));

  always #5 clk = ~clk;
  always @(posedge core_clk) core_pulses++;
  always @(posedge mul_clk)  mul_pulses++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (i == 0) begin core_pulses = 0; mul_pulses = 0; end
      mul_active = 1'($urandom);
      halted     = (i >= 300);
      if (!halted) want_core++;
      if (!halted && mul_active) want_mul++;
      @(posedge clk); #1;
      checks++;
      if (core_clk !== !halted || mul_clk !== (!halted && mul_active)) begin
        failures++;
        $display("FAIL cycle %0d halted=%b mul=%b core_clk=%b mul_clk=%b", i, halted, mul_active, core_clk, mul_clk);
      end
    end
    checks++;
    if (core_pulses != want_core || mul_pulses != want_mul) begin
      failures++;
      $display("FAIL pulses core %0d/%0d mul %0d/%0d", core_pulses, want_core, mul_pulses, want_mul);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
