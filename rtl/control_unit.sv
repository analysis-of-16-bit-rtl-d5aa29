// control_unit: instruction decoder of the decode stage.
// It splits the 16-bit instruction into register indices and an immediate and
// builds the control word that travels with the instruction down the pipe.
// As in the source it holds two decoders: the first maps the opcode to an
// arithmetic/logic operation (and to memory, branch and halt controls), the
// second decodes the fn field of the unary group into a shift or rotate
// (INC, DEC, NOT and MOV of the same group go to the ALU). Purely
// combinational; the decode stage latches its outputs on the falling edge.
// Register index choice: rx = instr[7:4] and ry = instr[3:0] for register
// forms; MVI and BRZ read rd through rx, STORE reads its data register rd
// through ry. Immediates: MVI uses instr[7:0]; LOAD/STORE sign-extend the
// 4-bit offset; branches carry instr[7:0] as the PC offset. Unused opcode
// patterns decode as NOP. The encoding is this design's own (see risc_pkg).
// has_imm and reads_ry tell the decode register which operand fields the
// instruction uses; the others are not reloaded, which saves switching.
module control_unit
  import risc_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [INSTR_W-1:0] instr,
  output ctrl_t              ctrl,
  output logic [RA_W-1:0]    rd,
  output logic [RA_W-1:0]    rx,
  output logic [RA_W-1:0]    ry,
  output logic [W-1:0]       imm
);
  opcode_e   op;
  logic [3:0] f_rd, f_rx, f_ry;
  logic [7:0] f_imm8;

  always_comb begin
    op     = opcode_e'(instr[15:12]);
    f_rd   = instr[11:8];
    f_rx   = instr[7:4];
    f_ry   = instr[3:0];
    f_imm8 = instr[7:0];
  end

  // Register indices and immediate
  always_comb begin
    rd  = f_rd;
    rx  = f_rx;
    ry  = f_ry;
    imm = W'(f_imm8);
    unique case (op)
      OP_MVI, OP_BRZ: rx = f_rd;
      OP_STORE:       ry = f_rd;
      default: ;
    endcase
    if (op == OP_LOAD || op == OP_STORE) imm = W'($signed(f_ry));
  end

  // Decoder 1: opcode -> arithmetic/logic operation and unit controls.
  // Decoder 2: unary fn -> shift/rotate or unary ALU operation.
  always_comb begin
    ctrl = CTRL_NOP;
    unique case (op)
      OP_MVI:  begin ctrl.reg_we = 1'b1; ctrl.use_imm = 1'b1; ctrl.alu_op = ALU_PASSB; end
      OP_ADD:  begin ctrl.reg_we = 1'b1; ctrl.sets_z = 1'b1; ctrl.alu_op = ALU_ADD;  end
      OP_SUB:  begin ctrl.reg_we = 1'b1; ctrl.sets_z = 1'b1; ctrl.alu_op = ALU_SUB;  end
      OP_AND:  begin ctrl.reg_we = 1'b1; ctrl.sets_z = 1'b1; ctrl.alu_op = ALU_AND;  end
      OP_OR:   begin ctrl.reg_we = 1'b1; ctrl.sets_z = 1'b1; ctrl.alu_op = ALU_OR;   end
      OP_XOR:  begin ctrl.reg_we = 1'b1; ctrl.sets_z = 1'b1; ctrl.alu_op = ALU_XOR;  end
      OP_NAND: begin ctrl.reg_we = 1'b1; ctrl.sets_z = 1'b1; ctrl.alu_op = ALU_NAND; end
      OP_NOR:  begin ctrl.reg_we = 1'b1; ctrl.sets_z = 1'b1; ctrl.alu_op = ALU_NOR;  end
      OP_MUL:  begin ctrl.reg_we = 1'b1; ctrl.sets_z = 1'b1; ctrl.unit = U_MUL;      end
      OP_UNARY: begin
        ctrl.reg_we = 1'b1;
        ctrl.sets_z = 1'b1;
        unique case (unary_fn_e'(f_ry))
          FN_NOT: ctrl.alu_op = ALU_NOT;
          FN_INC: ctrl.alu_op = ALU_INC;
          FN_DEC: ctrl.alu_op = ALU_DEC;
          FN_MOV: ctrl.alu_op = ALU_PASSA;
          FN_SHL: begin ctrl.unit = U_SHIFT; ctrl.sh_op = SH_SHL; end
          FN_SHR: begin ctrl.unit = U_SHIFT; ctrl.sh_op = SH_SHR; end
          FN_ROL: begin ctrl.unit = U_SHIFT; ctrl.sh_op = SH_ROL; end
          FN_ROR: begin ctrl.unit = U_SHIFT; ctrl.sh_op = SH_ROR; end
          default: ctrl = CTRL_NOP;
        endcase
      end
      OP_LOAD:  begin ctrl.reg_we = 1'b1; ctrl.use_imm = 1'b1; ctrl.alu_op = ALU_ADD; ctrl.mem_re = 1'b1; end
      OP_STORE: begin ctrl.use_imm = 1'b1; ctrl.alu_op = ALU_ADD; ctrl.mem_we = 1'b1; end
      OP_BRZ:   begin ctrl.is_branch = 1'b1; ctrl.br_cond = BR_REGZ; end
      OP_BR: begin
        unique case (br_field_e'(f_rd))
          BC_JMP:  begin ctrl.is_branch = 1'b1; ctrl.br_cond = BR_ALWAYS; end
          BC_BZ:   begin ctrl.is_branch = 1'b1; ctrl.br_cond = BR_Z;      end
          BC_BNZ:  begin ctrl.is_branch = 1'b1; ctrl.br_cond = BR_NZ;     end
          default: ctrl = CTRL_NOP;
        endcase
      end
      OP_HLT:  ctrl.halt = 1'b1;
      default: ctrl = CTRL_NOP;   // OP_NOP
    endcase
    // operand usage, so that the decode register loads only fields in use
    ctrl.has_imm  = ctrl.use_imm || ctrl.is_branch;
    ctrl.reads_ry = ctrl.mem_we ||
                    (ctrl.reg_we && !ctrl.use_imm && (ctrl.unit == U_MUL ||
                     (ctrl.unit == U_ALU && !(ctrl.alu_op inside {ALU_NOT, ALU_INC, ALU_DEC, ALU_PASSA}))));
  end
endmodule
