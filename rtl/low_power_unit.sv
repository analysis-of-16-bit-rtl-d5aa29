// low_power_unit: clock gating of the core.
// Two gated clocks are made from the free-running clock:
//  * core_clk runs the whole pipeline and stops once the core has halted
//    (HLT), so a halted core draws no dynamic clock power.
//  * mul_clk runs the multiplier only while it starts or works on a MUL; the
//    rest of the time its registers see no clock edge.
// Each gate is a latch-based cell, so enables may change while clk is low
// without cutting a pulse. The source names a low power unit using clock
// gating; which registers are gated is this design's choice.
module low_power_unit (
  input  logic clk,
  input  logic halted,
  input  logic mul_active,   // multiplier starting or busy
  output logic core_clk,
  output logic mul_clk
);
  logic mul_en;

  always_comb mul_en = mul_active && !halted;

  clock_gate u_core_gate (.clk(clk), .en(!halted), .gclk(core_clk));
  clock_gate u_mul_gate  (.clk(clk), .en(mul_en),  .gclk(mul_clk));
endmodule
