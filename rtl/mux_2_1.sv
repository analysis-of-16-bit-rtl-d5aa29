// mux_2_1: operand-B selector in front of the ALU.
// It forwards either the instruction's immediate or the ry register value to
// the ALU's second input, so one ALU serves register-register and
// register-immediate instructions. Port names follow the RTL schematic of the
// source (SEL, Imm, Ry, To_ALU); that sel = 1 picks the immediate is this
// design's choice. Purely combinational.
module mux_2_1 #(
  parameter int unsigned W = risc_pkg::DATA_W
) (
  input  logic         sel,     // 1: immediate, 0: register ry
  input  logic [W-1:0] imm,
  input  logic [W-1:0] ry,
  output logic [W-1:0] to_alu
);
  always_comb to_alu = sel ? imm : ry;
endmodule
