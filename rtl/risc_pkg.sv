// risc_pkg: shared sizes, instruction encoding and control-word types of the
// 4-stage low-power RISC core.
//
// Instruction word (16 bits, fields as the instruction/field values of the
// reference waveform show them):
//   R format : op[15:12] rd[11:8] rx[7:4] ry[3:0]      rd = rx OP ry
//   U format : op[15:12] rd[11:8] rx[7:4] fn[3:0]      rd = FN(rx)   (op 8)
//   I format : op[15:12] rd[11:8] imm[7:0]             MVI, branches
//   M format : op[15:12] rd[11:8] base[7:4] off[3:0]   LOAD / STORE, off signed
// The opcode numbers are this design's own assignment; the source names the
// instructions but gives no opcode table. 0x0 (NOP) and 0x1 (MVI) agree with
// the instruction words 0000 and 1xxx of the reference waveform.
package risc_pkg;

  localparam int unsigned DATA_W  = 8;   // register / ALU width
  localparam int unsigned INSTR_W = 16;  // instruction word
  localparam int unsigned PC_W    = 8;   // program counter / imem address
  localparam int unsigned NREG    = 16;  // general purpose registers
  localparam int unsigned RA_W    = 4;   // register index width
  localparam int unsigned DMEM_AW = 8;   // data memory address width

  typedef enum logic [3:0] {
    OP_NOP   = 4'h0,
    OP_MVI   = 4'h1,
    OP_ADD   = 4'h2,
    OP_SUB   = 4'h3,
    OP_AND   = 4'h4,
    OP_OR    = 4'h5,
    OP_XOR   = 4'h6,
    OP_MUL   = 4'h7,
    OP_UNARY = 4'h8,   // NOT INC DEC MOV SHL SHR ROL ROR, chosen by fn
    OP_NAND  = 4'h9,
    OP_NOR   = 4'hA,
    OP_BRZ   = 4'hB,   // branch if register rd is zero
    OP_LOAD  = 4'hC,
    OP_STORE = 4'hD,
    OP_BR    = 4'hE,   // JMP / BZ / BNZ, chosen by rd field
    OP_HLT   = 4'hF
  } opcode_e;

  // fn field of OP_UNARY
  typedef enum logic [3:0] {
    FN_NOT = 4'h0,
    FN_INC = 4'h1,
    FN_DEC = 4'h2,
    FN_MOV = 4'h3,
    FN_SHL = 4'h4,
    FN_SHR = 4'h5,
    FN_ROL = 4'h6,
    FN_ROR = 4'h7
  } unary_fn_e;

  // condition field (rd position) of OP_BR
  typedef enum logic [3:0] {
    BC_JMP = 4'h0,
    BC_BZ  = 4'h1,
    BC_BNZ = 4'h2
  } br_field_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NAND, ALU_NOR,
    ALU_NOT, ALU_INC, ALU_DEC, ALU_PASSA, ALU_PASSB
  } alu_op_e;

  typedef enum logic [1:0] { SH_SHL, SH_SHR, SH_ROL, SH_ROR } sh_op_e;

  typedef enum logic [1:0] { U_ALU, U_SHIFT, U_MUL } unit_e;

  typedef enum logic [1:0] { BR_ALWAYS, BR_Z, BR_NZ, BR_REGZ } br_cond_e;

  typedef struct packed {
    logic     reg_we;     // writes rd in write-back
    logic     use_imm;    // 2:1 mux selects the immediate as ALU operand B
    logic     has_imm;    // instruction carries an immediate or branch offset
    logic     reads_ry;   // instruction reads register ry
    alu_op_e  alu_op;
    sh_op_e   sh_op;
    unit_e    unit;       // which execute unit gives the result
    logic     mem_re;     // LOAD
    logic     mem_we;     // STORE
    logic     is_branch;
    br_cond_e br_cond;
    logic     halt;       // HLT
    logic     sets_z;     // result updates the zero flag
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{
    reg_we: 1'b0, use_imm: 1'b0, has_imm: 1'b0, reads_ry: 1'b0, alu_op: ALU_PASSA, sh_op: SH_SHL, unit: U_ALU,
    mem_re: 1'b0, mem_we: 1'b0, is_branch: 1'b0, br_cond: BR_ALWAYS,
    halt: 1'b0, sets_z: 1'b0};

endpackage
