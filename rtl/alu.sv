// alu: arithmetic and logic unit of the execute stage.
// Two-operand operations (ADD, SUB, AND, OR, XOR, NAND, NOR) and one-operand
// operations on a (NOT, INC, DEC, pass) or b (pass, used by MVI), selected by
// the control word. zero flags an all-zero result. Purely combinational.
// The operation list follows the instruction set named by the source; the
// operation encoding is this design's own.
module alu
  import risc_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  alu_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y,
  output logic         zero
);
  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_NAND:  y = ~(a & b);
      ALU_NOR:   y = ~(a | b);
      ALU_NOT:   y = ~a;
      ALU_INC:   y = a + W'(1);
      ALU_DEC:   y = a - W'(1);
      ALU_PASSA: y = a;
      ALU_PASSB: y = b;
      default:   y = a;
    endcase
    zero = (y == '0);
  end
endmodule
